// tb_wlsl_sweep: both detectors at several window and sliding lengths
// (WL, SL) = (1,1), (3,2), (5,1), (5,5), (10,1), (10,10), each an independent
// wlsl_case with its own models. Reports the number of different windows
// and the faulty runs detected for each setting.
module tb_wlsl_sweep;
  localparam int N = 6;
  logic clk = 0, start = 0;
  logic [N-1:0] done;
  int checks [N], failures [N], windows [N], dc [N], db [N];
  int tot_checks = 0, tot_failures = 0;

  always #5 clk = ~clk;

  wlsl_case #(.WL(1),  .SL(1))  c0 (.clk, .start, .done(done[0]), .checks(checks[0]), .failures(failures[0]), .windows(windows[0]), .detected_cam(dc[0]), .detected_bf(db[0]));
  wlsl_case #(.WL(3),  .SL(2))  c1 (.clk, .start, .done(done[1]), .checks(checks[1]), .failures(failures[1]), .windows(windows[1]), .detected_cam(dc[1]), .detected_bf(db[1]));
  wlsl_case #(.WL(5),  .SL(1))  c2 (.clk, .start, .done(done[2]), .checks(checks[2]), .failures(failures[2]), .windows(windows[2]), .detected_cam(dc[2]), .detected_bf(db[2]));
  wlsl_case #(.WL(5),  .SL(5))  c3 (.clk, .start, .done(done[3]), .checks(checks[3]), .failures(failures[3]), .windows(windows[3]), .detected_cam(dc[3]), .detected_bf(db[3]));
  wlsl_case #(.WL(10), .SL(1))  c4 (.clk, .start, .done(done[4]), .checks(checks[4]), .failures(failures[4]), .windows(windows[4]), .detected_cam(dc[4]), .detected_bf(db[4]));
  wlsl_case #(.WL(10), .SL(10)) c5 (.clk, .start, .done(done[5]), .checks(checks[5]), .failures(failures[5]), .windows(windows[5]), .detected_cam(dc[5]), .detected_bf(db[5]));

  initial begin
    #100ms;
    $display("TB_RESULT checks=%0d failures=%0d", tot_checks, tot_failures + 1); $finish;
  end

  initial begin
    int wl [N] = '{1, 3, 5, 5, 10, 10};
    int sl [N] = '{1, 2, 1, 5, 1, 10};
    #20 start = 1;
    wait (&done);
    for (int i = 0; i < N; i++) begin
      $display("WL=%2d SL=%2d: %3d windows, faulty runs detected CAM %0d/20 BF %0d/20",
               wl[i], sl[i], windows[i], dc[i], db[i]);
      tot_checks += checks[i]; tot_failures += failures[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", tot_checks, tot_failures);
    $finish;
  end
endmodule
