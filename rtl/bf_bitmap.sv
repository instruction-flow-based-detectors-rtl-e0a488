// bf_bitmap: the m-entry bit map of the Bloom filter, with K lookup ports.
//
// Lookup: the K indices (one per hash function) read K bits without a clock
// and member is their AND; a 0 anywhere means the element was never inserted.
// Insert (design phase): with set_en high, the K indexed bits are set to 1 at
// the clock edge. A single bit can also be written directly through wr_en /
// wr_addr / wr_bit, so software can load a precomputed bit map, and clear sets
// every bit to 0 (the first step of the design phase). Writes are visible to
// lookups in the next cycle. The bit map, the AND of the K bits and the
// clear-then-set filling follow the Bloom filter description; the direct write
// port and the port priorities (clear, then direct write, then set) are this
// design's own choices.
module bf_bitmap #(
  parameter int unsigned M = ifd_pkg::BF_M,
  parameter int unsigned K = ifd_pkg::BF_K,
  localparam int unsigned IW = $clog2(M)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                clear,
  input  logic                set_en,
  input  logic [K-1:0][IW-1:0] idx,     // one index per hash function
  input  logic                wr_en,
  input  logic [IW-1:0]       wr_addr,
  input  logic                wr_bit,
  output logic [K-1:0]        bits,     // the K indexed bits
  output logic                member    // AND of the K bits
);

  logic [M-1:0] map_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      map_q <= '0;
    end else if (clear) begin
      map_q <= '0;
    end else begin
      if (set_en)
        for (int unsigned j = 0; j < K; j++) map_q[idx[j]] <= 1'b1;
      if (wr_en) map_q[wr_addr] <= wr_bit;
    end
  end

  always_comb begin
    for (int unsigned j = 0; j < K; j++) bits[j] = map_q[idx[j]];
  end

  assign member = &bits;

  initial begin
    assert (M == (1 << IW))
      else $error("bf_bitmap: M must be a power of two (indices are hash bits)");
  end

endmodule
