// tb_bf_bitmap: the 512-entry, 2-port bit map against a bit-array model:
// random inserts (both indices set), direct bit writes, lookups of the AND of
// the two indexed bits, and clear.
module tb_bf_bitmap;
  localparam int M = 512, K = 2, IW = 9;
  logic clk = 0, rst_n = 0, clear = 0, set_en = 0, wr_en = 0, wr_bit = 0;
  logic [K-1:0][IW-1:0] idx = '0;
  logic [IW-1:0] wr_addr = '0;
  logic [K-1:0] bits;
  logic member;
  int checks = 0, failures = 0, n_members = 0;
  bit model [M];

  bf_bitmap #(.M(M), .K(K)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    foreach (model[i]) model[i] = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int c = 0; c < 6000; c++) begin
      @(negedge clk);
      clear  = ($urandom_range(999) == 0);
      set_en = ($urandom_range(3) == 0);
      wr_en  = ($urandom_range(15) == 0);
      wr_addr = IW'($urandom); wr_bit = $urandom_range(1);
      idx[0] = IW'($urandom); idx[1] = IW'($urandom);
      #1;
      checks++;
      if (bits !== {1'(model[idx[1]]), 1'(model[idx[0]])} ||
          member !== (model[idx[0]] && model[idx[1]])) begin
        failures++;
        if (failures < 10) $display("lookup %0d,%0d: bits %b member %b", idx[0], idx[1], bits, member);
      end
      n_members += int'(member);
      @(posedge clk);
      if (clear) foreach (model[i]) model[i] = 0;
      else begin
        if (set_en) begin model[idx[0]] = 1; model[idx[1]] = 1; end
        if (wr_en) model[wr_addr] = wr_bit;
      end
    end
    checks++;
    if (n_members == 0) begin failures++; $display("no lookup ever hit"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
