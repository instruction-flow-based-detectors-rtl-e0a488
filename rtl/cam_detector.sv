// cam_detector: fault detector that looks up each instruction window in a CAM.
//
// Three parts, as in the CAM detector's block diagram: a window buffer that
// keeps the last WL fetched instructions, a CAM table of the windows seen in
// fault-free runs, and an FSM controller that waits for the first WL
// instructions and then asks for a check after every SL fetched instructions.
//
// Evaluation (learn low): the check searches the CAM with the whole
// WL*XLEN-bit window; a miss is a fault. The result is registered: chk_valid
// and chk_fault are high for one cycle two cycles after the fetch that
// completed the window, match_addr holds the matching row, and alarm (an
// interrupt request to the CPU) stays high from the first fault until
// alarm_clr.
// Design phase (learn high): a window that misses is written to the next free
// row, so each different window is stored once; entries counts the rows used
// and overflow is set if a new window finds the table full. The table can also
// be cleared and written row by row (tbl_*), as software would load the
// windows of an application; such a write takes precedence over a learn
// write in the same cycle, which is then dropped.
// The structure and the one-check-per-fetch behaviour follow the document;
// the learn mode, the entry counter, the overflow flag and the exact latency
// are this design's own choices.
module cam_detector #(
  parameter int unsigned WL    = ifd_pkg::WL,
  parameter int unsigned SL    = ifd_pkg::SL,
  parameter int unsigned XLEN  = ifd_pkg::XLEN,
  parameter int unsigned DEPTH = ifd_pkg::CAM_DEPTH,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned CNTW = $clog2(DEPTH + 1)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               enable,       // low: paused (e.g. interrupt)
  input  logic               restart,      // new protected run: refill window
  input  logic               learn,        // design phase: store new windows
  input  logic               fetch_valid,
  input  logic [XLEN-1:0]    fetch_instr,
  input  logic               tbl_clear,
  input  logic               tbl_wr_en,
  input  logic [AW-1:0]      tbl_wr_addr,
  input  logic [WL*XLEN-1:0] tbl_wr_data,
  input  logic               alarm_clr,
  output logic               filled,       // window holds WL instructions
  output logic               chk_valid,    // a check result is shown
  output logic               chk_fault,    // ... and the window was invalid
  output logic [AW-1:0]      match_addr,   // row that matched
  output logic               alarm,        // sticky fault alarm (IRQ)
  output logic [CNTW-1:0]    entries,      // rows in use
  output logic               overflow      // learn found the table full
);

  logic               shift_en, clr, check;
  logic [WL*XLEN-1:0] window;
  logic               hit;
  logic [AW-1:0]      hit_addr;
  logic               learn_wr;
  logic               wr_en;
  logic [AW-1:0]      wr_addr;
  logic [WL*XLEN-1:0] wr_data;
  logic [CNTW-1:0]    entries_q;
  logic               overflow_q, chk_valid_q, chk_fault_q, alarm_q;
  logic [AW-1:0]      match_q;

  window_ctrl #(.WL(WL), .SL(SL)) u_ctrl (
    .clk, .rst_n, .enable, .restart, .fetch_valid,
    .shift_en, .clr, .check, .filled
  );

  window_buffer #(.WL(WL), .XLEN(XLEN)) u_buf (
    .clk, .rst_n, .clr, .shift_en, .instr(fetch_instr), .window
  );

  assign learn_wr = check && learn && !hit && (int'(entries_q) < DEPTH) && !tbl_wr_en;
  assign wr_en    = tbl_wr_en || learn_wr;
  assign wr_addr  = tbl_wr_en ? tbl_wr_addr : AW'(entries_q);
  assign wr_data  = tbl_wr_en ? tbl_wr_data : window;

  cam_table #(.DEPTH(DEPTH), .WIDTH(WL*XLEN)) u_cam (
    .clk, .rst_n, .clear(tbl_clear), .wr_en, .wr_addr, .wr_data,
    .key(window), .hit, .hit_addr
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      entries_q   <= '0;
      overflow_q  <= 1'b0;
      chk_valid_q <= 1'b0;
      chk_fault_q <= 1'b0;
      match_q     <= '0;
      alarm_q     <= 1'b0;
    end else begin
      chk_valid_q <= check;
      chk_fault_q <= check && !learn && !hit;
      if (check) match_q <= hit_addr;

      if (alarm_clr)                  alarm_q <= 1'b0;
      else if (check && !learn && !hit) alarm_q <= 1'b1;

      if (tbl_clear) begin
        entries_q  <= '0;
        overflow_q <= 1'b0;
      end else if (tbl_wr_en) begin
        if (CNTW'(tbl_wr_addr) >= entries_q) entries_q <= CNTW'(tbl_wr_addr) + 1'b1;
      end else if (learn_wr) begin
        entries_q <= entries_q + 1'b1;
      end else if (check && learn && !hit) begin
        overflow_q <= 1'b1;  // new window but no free row
      end
    end
  end

  assign chk_valid  = chk_valid_q;
  assign chk_fault  = chk_fault_q;
  assign match_addr = match_q;
  assign alarm      = alarm_q;
  assign entries    = entries_q;
  assign overflow   = overflow_q;

endmodule
