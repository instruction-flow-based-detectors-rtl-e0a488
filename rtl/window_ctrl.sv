// window_ctrl: FSM controller that paces the checks of a detector.
//
// After a restart the window holds no valid instructions, so the controller
// first counts WL fetched instructions (state FILL) before it allows the first
// check; from then on (state RUN) it requests a check every SL fetched
// instructions, so consecutive checked windows overlap by WL-SL instructions.
// While enable is low (the processor is serving an interrupt or is not running
// a protected program) fetched instructions are ignored and the window and
// counters keep their values; the detector resumes where it stopped.
//
// Interface: shift_en goes to the window buffer in the same cycle as
// fetch_valid; check is registered, so it is high in the cycle after the
// shift, when the buffer shows the new window. restart clears the buffer (clr)
// and returns to FILL.
//
// Counting the fill and the sliding length follow the detector description;
// the restart and enable inputs model the operating-system control it
// mentions, and their exact behaviour is this design's own choice.
module window_ctrl #(
  parameter int unsigned WL = ifd_pkg::WL,
  parameter int unsigned SL = ifd_pkg::SL
) (
  input  logic clk,
  input  logic rst_n,
  input  logic enable,       // detector switched on (low: paused)
  input  logic restart,      // start a new protected run
  input  logic fetch_valid,  // an instruction is fetched this cycle
  output logic shift_en,     // shift the fetched instruction into the window
  output logic clr,          // empty the window
  output logic check,        // the window shown now must be checked
  output logic filled        // the window holds WL valid instructions
);

  typedef enum logic {S_FILL, S_RUN} state_e;

  localparam int unsigned CW = $clog2(WL + 1);
  localparam int unsigned SW = $clog2(SL + 1);

  state_e        state_q;
  logic [CW-1:0] fill_q;
  logic [SW-1:0] slide_q;
  logic          check_q;

  assign shift_en = fetch_valid && enable && !restart;
  assign clr      = restart;
  assign check    = check_q;
  assign filled   = (state_q == S_RUN);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_FILL;
      fill_q  <= '0;
      slide_q <= '0;
      check_q <= 1'b0;
    end else begin
      check_q <= 1'b0;
      if (restart) begin
        state_q <= S_FILL;
        fill_q  <= '0;
        slide_q <= '0;
      end else if (shift_en) begin
        unique case (state_q)
          S_FILL: begin
            if (fill_q == CW'(WL - 1)) begin
              state_q <= S_RUN;
              check_q <= 1'b1;
              slide_q <= '0;
            end
            fill_q <= fill_q + 1'b1;
          end
          S_RUN: begin
            if (slide_q == SW'(SL - 1)) begin
              check_q <= 1'b1;
              slide_q <= '0;
            end else begin
              slide_q <= slide_q + 1'b1;
            end
          end
        endcase
      end
    end
  end

  initial begin
    assert (SL >= 1 && SL <= WL)
      else $error("window_ctrl: the sliding length must satisfy 1 <= SL <= WL");
  end

endmodule
