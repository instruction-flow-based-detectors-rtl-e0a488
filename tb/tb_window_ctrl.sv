// tb_window_ctrl: two controllers (WL=5/SL=1 and WL=4/SL=2) under random
// fetches, pauses and restarts. A counting model predicts in which cycles a
// check must be requested: one cycle after the fetch that completes the first
// window, then one cycle after every SL-th further fetch.
module tb_window_ctrl;
  logic clk = 0, rst_n = 0, enable = 0, restart = 0, fetch_valid = 0;
  logic shift_a, clr_a, check_a, filled_a;
  logic shift_b, clr_b, check_b, filled_b;
  int checks = 0, failures = 0;
  int n_checks_a = 0, n_checks_b = 0;

  window_ctrl #(.WL(5), .SL(1)) dut_a (.clk, .rst_n, .enable, .restart, .fetch_valid,
    .shift_en(shift_a), .clr(clr_a), .check(check_a), .filled(filled_a));
  window_ctrl #(.WL(4), .SL(2)) dut_b (.clk, .rst_n, .enable, .restart, .fetch_valid,
    .shift_en(shift_b), .clr(clr_b), .check(check_b), .filled(filled_b));

  always #5 clk = ~clk;

  initial begin
    #500000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // model: fetches counted since the last restart
  int cnt = 0;
  bit exp_a = 0, exp_b = 0;

  task automatic expect_eq(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("%0t %s: got %0b expected %0b (cnt %0d)", $time, what, got, exp, cnt);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 5000; c++) begin
      @(negedge clk);
      restart     = ($urandom_range(199) == 0);
      enable      = ($urandom_range(9) != 0);
      fetch_valid = $urandom_range(3) != 0;
      #1;
      expect_eq("shift_en", shift_a, fetch_valid && enable && !restart);
      expect_eq("clr", clr_a, restart);
      @(posedge clk);
      exp_a = 0; exp_b = 0;
      if (restart) cnt = 0;
      else if (fetch_valid && enable) begin
        cnt++;
        exp_a = (cnt >= 5) && (((cnt - 5) % 1) == 0);
        exp_b = (cnt >= 4) && (((cnt - 4) % 2) == 0);
      end
      #1;
      expect_eq("check_a", check_a, exp_a);
      expect_eq("check_b", check_b, exp_b);
      expect_eq("filled_a", filled_a, cnt >= 5);
      expect_eq("filled_b", filled_b, cnt >= 4);
      n_checks_a += int'(check_a); n_checks_b += int'(check_b);
    end
    checks++;
    if (n_checks_a == 0 || n_checks_b == 0 || n_checks_b >= n_checks_a) begin
      failures++; $display("check counts implausible: %0d %0d", n_checks_a, n_checks_b);
    end
    $display("checks requested: SL=1 %0d, SL=2 %0d", n_checks_a, n_checks_b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
