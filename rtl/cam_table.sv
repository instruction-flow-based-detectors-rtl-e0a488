// cam_table: content addressable memory of valid instruction windows.
//
// Each of the DEPTH rows holds one WIDTH-bit key (a window of WL instructions)
// and a valid bit. A search compares the key with every valid row in
// parallel, in one cycle and without a clock: hit is high when a row matches,
// and hit_addr is the encoded address of the lowest matching row (0 when
// there is none). Rows are written one at a time through the write port (the
// design phase, or a load by the operating system) and clear invalidates
// every row at once. A write becomes visible to searches in the next cycle.
// The parallel compare with an encoded address output follows the CAM
// description; priority to the lowest row and the clear input are this
// design's own choices.
module cam_table #(
  parameter int unsigned DEPTH = ifd_pkg::CAM_DEPTH,
  parameter int unsigned WIDTH = ifd_pkg::WL * ifd_pkg::XLEN,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,     // invalidate every row
  input  logic             wr_en,     // write wr_data into row wr_addr
  input  logic [AW-1:0]    wr_addr,
  input  logic [WIDTH-1:0] wr_data,
  input  logic [WIDTH-1:0] key,       // search key
  output logic             hit,
  output logic [AW-1:0]    hit_addr
);

  logic [WIDTH-1:0] row_q   [DEPTH];
  logic [DEPTH-1:0] valid_q;
  logic [DEPTH-1:0] match;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= '0;
    end else if (clear) begin
      valid_q <= '0;
    end else if (wr_en && (int'(wr_addr) < DEPTH)) begin
      valid_q[wr_addr] <= 1'b1;
    end
  end

  // Row contents need no reset: a row is only read once its valid bit is set.
  always_ff @(posedge clk) begin
    if (wr_en && !clear && (int'(wr_addr) < DEPTH)) row_q[wr_addr] <= wr_data;
  end

  always_comb begin
    for (int unsigned i = 0; i < DEPTH; i++)
      match[i] = valid_q[i] && (row_q[i] == key);
  end

  // Priority encoder: address of the lowest matching row.
  always_comb begin
    hit_addr = '0;
    for (int i = DEPTH - 1; i >= 0; i--)
      if (match[i]) hit_addr = AW'(i);
  end

  assign hit = |match;

endmodule
