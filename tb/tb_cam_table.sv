// tb_cam_table: fills a full-size CAM (213 rows of 160 bits) with random keys
// (some duplicated), then searches for stored and unstored keys and checks
// hit and the lowest matching address against an array model; also checks
// that clear empties the table and that a search is answered in the same cycle.
module tb_cam_table;
  localparam int DEPTH = 213, WIDTH = 160, AW = $clog2(DEPTH);
  logic clk = 0, rst_n = 0, clear = 0, wr_en = 0;
  logic [AW-1:0] wr_addr = '0;
  logic [WIDTH-1:0] wr_data = '0, key = '0;
  logic hit;
  logic [AW-1:0] hit_addr;
  int checks = 0, failures = 0;
  logic [WIDTH-1:0] mrow [DEPTH];
  bit mvalid [DEPTH];

  cam_table #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic logic [WIDTH-1:0] rnd();
    logic [WIDTH-1:0] v;
    for (int i = 0; i < WIDTH / 32; i++) v[32*i +: 32] = $urandom;
    return v;
  endfunction

  task automatic search(logic [WIDTH-1:0] k);
    bit eh = 0; int ea = 0;
    for (int i = DEPTH - 1; i >= 0; i--) if (mvalid[i] && mrow[i] == k) begin eh = 1; ea = i; end
    @(negedge clk); key = k; #1;
    checks++;
    if (hit !== eh || (eh && hit_addr !== AW'(ea))) begin
      failures++;
      if (failures < 10) $display("search: hit %0b@%0d expected %0b@%0d", hit, hit_addr, eh, ea);
    end
  endtask

  task automatic write(int a, logic [WIDTH-1:0] d);
    @(negedge clk); wr_en = 1; wr_addr = AW'(a); wr_data = d;
    @(posedge clk); mrow[a] = d; mvalid[a] = 1;
    #1 wr_en = 0;
  endtask

  initial begin
    foreach (mvalid[i]) mvalid[i] = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    // empty table: nothing hits, not even the all-zero key
    search('0);
    for (int i = 0; i < DEPTH; i++) write(i, (i % 17 == 16) ? mrow[i-5] : rnd());
    for (int n = 0; n < 600; n++) begin
      int a = $urandom_range(DEPTH - 1);
      search($urandom_range(1) ? mrow[a] : rnd());
    end
    // overwrite some rows and search again
    for (int n = 0; n < 40; n++) write($urandom_range(DEPTH - 1), rnd());
    for (int a = 0; a < DEPTH; a++) search(mrow[a]);
    // clear
    @(negedge clk); clear = 1; @(posedge clk); #1 clear = 0;
    foreach (mvalid[i]) mvalid[i] = 0;
    for (int a = 0; a < DEPTH; a += 7) search(mrow[a]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
