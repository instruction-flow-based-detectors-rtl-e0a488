// tb_window_buffer: random shifts and clears against a queue model of the
// last WL instructions; the parallel window is compared every cycle.
module tb_window_buffer;
  localparam int WL = 5, XLEN = 32;
  logic clk = 0, rst_n = 0, clr = 0, shift_en = 0;
  logic [XLEN-1:0] instr = '0;
  logic [WL*XLEN-1:0] window;
  int checks = 0, failures = 0;
  logic [XLEN-1:0] model [WL];
  logic [WL*XLEN-1:0] exp_w;

  window_buffer #(.WL(WL), .XLEN(XLEN)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    foreach (model[i]) model[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 2000; c++) begin
      @(negedge clk);
      clr = ($urandom_range(99) == 0);
      shift_en = $urandom_range(1);
      instr = $urandom;
      @(posedge clk);
      if (clr) foreach (model[i]) model[i] = '0;
      else if (shift_en) begin
        for (int i = 0; i < WL - 1; i++) model[i] = model[i+1];
        model[WL-1] = instr;
      end
      #1;
      for (int i = 0; i < WL; i++) exp_w[i*XLEN +: XLEN] = model[i];
      checks++;
      if (window !== exp_w) begin
        failures++;
        if (failures < 5) $display("mismatch cycle %0d: %h vs %h", c, window, exp_w);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
