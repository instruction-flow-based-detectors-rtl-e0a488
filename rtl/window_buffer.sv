// window_buffer: shift-register FIFO holding the last WL fetched instructions.
//
// Every cycle with shift_en high the newest instruction enters at slot WL-1
// and every older instruction moves one slot down; the instruction in slot 0
// (the oldest) drops out. The whole window is presented in parallel as a
// WL*XLEN-bit sequence, {slot WL-1 (newest), ..., slot 0 (oldest)}, which is
// the 5 x 32 = 160-bit signal the CAM and the hashes read. clr empties the
// window (all zeros) when the detector is restarted. The window is a
// registered output: it shows an instruction the cycle after it was shifted in.
// The FIFO and its width follow the detector description; the clear input and
// the slot order are this design's own choices.
module window_buffer #(
  parameter int unsigned WL   = ifd_pkg::WL,
  parameter int unsigned XLEN = ifd_pkg::XLEN
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clr,       // empty the window
  input  logic                 shift_en,  // shift instr in
  input  logic [XLEN-1:0]      instr,     // newly fetched instruction
  output logic [WL*XLEN-1:0]   window     // {newest, ..., oldest}
);

  logic [WL-1:0][XLEN-1:0] slot_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      slot_q <= '0;
    end else if (clr) begin
      slot_q <= '0;
    end else if (shift_en) begin
      for (int unsigned i = 0; i + 1 < WL; i++) slot_q[i] <= slot_q[i+1];
      slot_q[WL-1] <= instr;
    end
  end

  assign window = slot_q;

endmodule
