// ifd_top: instruction-flow fault detectors beside a RISC-V core.
//
// The core's instruction buffer hands every fetched instruction to this block
// (fetch_valid / fetch_instr). Two detectors watch the same stream in
// parallel, each with its own window of the last WL instructions:
//   - the CAM detector, which accepts a window only if it is stored exactly;
//   - the Bloom filter detector, which accepts a window if both of its hash
//     bits are set in a 512-bit map.
// The third detector of the same family, a recurrent neural network, is not
// part of this RTL: the 11 bits it reads from each instruction (opcode,
// funct3 and bit 30) are brought out on rnn_feat, and its verdict comes back
// on rnn_alarm. irq is the OR of the three sticky alarms and is meant for the
// core's interrupt input.
//
// Control, shared by both detectors: enable pauses them (for instance while
// the core serves an interrupt), restart starts a new protected run, learn
// selects the design phase in which the valid windows are stored. The CAM
// table and the bit map can also be loaded directly by software.
// The two detectors and their parameters follow the document; running them
// side by side on one stream, the shared controls and the irq OR are this
// design's own choices.
module ifd_top #(
  parameter int unsigned WL        = ifd_pkg::WL,
  parameter int unsigned SL        = ifd_pkg::SL,
  parameter int unsigned XLEN      = ifd_pkg::XLEN,
  parameter int unsigned CAM_DEPTH = ifd_pkg::CAM_DEPTH,
  parameter int unsigned BF_M      = ifd_pkg::BF_M,
  localparam int unsigned AW       = (CAM_DEPTH > 1) ? $clog2(CAM_DEPTH) : 1,
  localparam int unsigned CNTW     = $clog2(CAM_DEPTH + 1),
  localparam int unsigned IW       = $clog2(BF_M)
) (
  input  logic               clk,
  input  logic               rst_n,
  // control
  input  logic               enable,
  input  logic               restart,
  input  logic               learn,
  input  logic               alarm_clr,
  // fetched instructions from the core's instruction buffer
  input  logic               fetch_valid,
  input  logic [XLEN-1:0]    fetch_instr,
  // software load of the CAM table
  input  logic               cam_clear,
  input  logic               cam_wr_en,
  input  logic [AW-1:0]      cam_wr_addr,
  input  logic [WL*XLEN-1:0] cam_wr_data,
  // software load of the Bloom filter bit map
  input  logic               bf_clear,
  input  logic               bf_wr_en,
  input  logic [IW-1:0]      bf_wr_addr,
  input  logic               bf_wr_bit,
  // CAM detector
  output logic               cam_chk_valid,
  output logic               cam_fault,
  output logic [AW-1:0]      cam_match_addr,
  output logic               cam_alarm,
  output logic [CNTW-1:0]    cam_entries,
  output logic               cam_overflow,
  // Bloom filter detector
  output logic               bf_chk_valid,
  output logic               bf_fault,
  output logic               bf_alarm,
  output logic [15:0]        bf_new_windows,
  // external RNN detector
  output logic               rnn_feat_valid,
  output ifd_pkg::rnn_feat_t rnn_feat,
  input  logic               rnn_alarm,
  // interrupt request to the core
  output logic               irq
);

  logic cam_filled, bf_filled;

  cam_detector #(.WL(WL), .SL(SL), .XLEN(XLEN), .DEPTH(CAM_DEPTH)) u_cam (
    .clk, .rst_n, .enable, .restart, .learn, .fetch_valid, .fetch_instr,
    .tbl_clear(cam_clear), .tbl_wr_en(cam_wr_en), .tbl_wr_addr(cam_wr_addr),
    .tbl_wr_data(cam_wr_data), .alarm_clr,
    .filled(cam_filled), .chk_valid(cam_chk_valid), .chk_fault(cam_fault),
    .match_addr(cam_match_addr), .alarm(cam_alarm), .entries(cam_entries),
    .overflow(cam_overflow)
  );

  bf_detector #(.WL(WL), .SL(SL), .XLEN(XLEN), .M(BF_M)) u_bf (
    .clk, .rst_n, .enable, .restart, .learn, .fetch_valid, .fetch_instr,
    .bm_clear(bf_clear), .bm_wr_en(bf_wr_en), .bm_wr_addr(bf_wr_addr),
    .bm_wr_bit(bf_wr_bit), .alarm_clr,
    .filled(bf_filled), .chk_valid(bf_chk_valid), .chk_fault(bf_fault),
    .alarm(bf_alarm), .new_windows(bf_new_windows)
  );

  // Feature stream for the RNN detector: one 11-bit feature per fetched
  // instruction, registered, while the detectors are enabled.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rnn_feat_valid <= 1'b0;
      rnn_feat       <= '0;
    end else begin
      rnn_feat_valid <= fetch_valid && enable && !restart;
      if (fetch_valid && enable) rnn_feat <= ifd_pkg::rnn_feature(fetch_instr[31:0]);
    end
  end

  assign irq = cam_alarm || bf_alarm || rnn_alarm;

endmodule
