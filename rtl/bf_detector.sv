// bf_detector: fault detector that tests each instruction window against a
// Bloom filter.
//
// A window buffer keeps the last WL fetched instructions and the FSM
// controller asks for a check after the first WL and then every SL fetched
// instructions. Two hash functions, FNV-1a and MurmurHash2, each hash the
// whole WL*XLEN-bit window in one cycle; the low log2(M) bits of each hash
// index the M-bit bit map. In evaluation (learn low) the window is accepted
// when both indexed bits are 1 and flagged as a fault otherwise; a Bloom
// filter never rejects a window it was filled with, but may accept an unseen
// one (false positive rate (1 - e^(-k n / m))^k for n stored windows).
// In the design phase (learn high) both indexed bits are set; new_windows
// counts the insertions that changed the bit map. The bit map can also be
// cleared and written bit by bit (bm_*), as software would load it.
//
// Timing is that of the CAM detector: chk_valid / chk_fault are registered
// one cycle after the check, two cycles after the completing fetch, and alarm
// stays high from the first fault until alarm_clr.
// k = 2, m = 512, the two hash functions and single-cycle lookups follow the
// document; the learn mode, the counter and the latency are this design's own
// choices.
module bf_detector #(
  parameter int unsigned WL   = ifd_pkg::WL,
  parameter int unsigned SL   = ifd_pkg::SL,
  parameter int unsigned XLEN = ifd_pkg::XLEN,
  parameter int unsigned M    = ifd_pkg::BF_M,
  localparam int unsigned IW  = $clog2(M)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               enable,
  input  logic               restart,
  input  logic               learn,
  input  logic               fetch_valid,
  input  logic [XLEN-1:0]    fetch_instr,
  input  logic               bm_clear,
  input  logic               bm_wr_en,
  input  logic [IW-1:0]      bm_wr_addr,
  input  logic               bm_wr_bit,
  input  logic               alarm_clr,
  output logic               filled,
  output logic               chk_valid,
  output logic               chk_fault,
  output logic               alarm,
  output logic [15:0]        new_windows
);

  localparam int unsigned K = 2;  // FNV and Murmur

  logic               shift_en, clr, check;
  logic [WL*XLEN-1:0] window;
  logic [31:0]        h_fnv, h_mur;
  logic [K-1:0][IW-1:0] idx;
  logic [K-1:0]       bits;
  logic               member;
  logic               chk_valid_q, chk_fault_q, alarm_q;
  logic [15:0]        new_q;

  window_ctrl #(.WL(WL), .SL(SL)) u_ctrl (
    .clk, .rst_n, .enable, .restart, .fetch_valid,
    .shift_en, .clr, .check, .filled
  );

  window_buffer #(.WL(WL), .XLEN(XLEN)) u_buf (
    .clk, .rst_n, .clr, .shift_en, .instr(fetch_instr), .window
  );

  fnv_hash    #(.NBYTES(WL*XLEN/8)) u_fnv (.data(window), .hash(h_fnv));
  murmur_hash #(.NWORDS(WL*XLEN/32)) u_mur (.data(window), .hash(h_mur));

  assign idx[0] = h_fnv[IW-1:0];
  assign idx[1] = h_mur[IW-1:0];

  bf_bitmap #(.M(M), .K(K)) u_map (
    .clk, .rst_n, .clear(bm_clear), .set_en(check && learn), .idx,
    .wr_en(bm_wr_en), .wr_addr(bm_wr_addr), .wr_bit(bm_wr_bit),
    .bits, .member
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      chk_valid_q <= 1'b0;
      chk_fault_q <= 1'b0;
      alarm_q     <= 1'b0;
      new_q       <= '0;
    end else begin
      chk_valid_q <= check;
      chk_fault_q <= check && !learn && !member;
      if (alarm_clr)                       alarm_q <= 1'b0;
      else if (check && !learn && !member) alarm_q <= 1'b1;
      if (bm_clear)                       new_q <= '0;
      else if (check && learn && !member) new_q <= new_q + 1'b1;
    end
  end

  assign chk_valid   = chk_valid_q;
  assign chk_fault   = chk_fault_q;
  assign alarm       = alarm_q;
  assign new_windows = new_q;

  initial begin
    assert ((XLEN % 32) == 0)
      else $error("bf_detector: the hashes read whole 32-bit words");
  end

endmodule
