// tb_vidx_map: exhaustive-style check of virtual-to-physical index mapping.
//
// For a 512-entry and a 64-entry structure (the active list and the LSQ),
// random heads and offsets: an index j past the virtual head must map to the
// physical head plus j modulo the size and fit exactly when j < size,
// including indices that wrap the 16-bit virtual counter.
module tb_vidx_map;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [15:0] hv, v;
  logic [8:0]  hp512, p512;
  logic [5:0]  hp64,  p64;
  logic        f512, f64;
  vidx_map #(.SIZE(512), .VW(16)) u512 (.head_v(hv), .head_p(hp512), .v(v), .p(p512), .fits(f512));
  vidx_map #(.SIZE(64),  .VW(16)) u64  (.head_v(hv), .head_p(hp64),  .v(v), .p(p64),  .fits(f64));

  task automatic chk(input logic c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    int j;
    for (int n = 0; n < 20000; n++) begin
      hv = 16'($urandom); hp512 = 9'($urandom); hp64 = 6'($urandom);
      j  = (n % 2) ? $urandom_range(0, 700) : $urandom_range(0, 65535);
      v  = hv + 16'(j);
      #1;
      chk(f512 == (j < 512), "fits 512");
      chk(f64  == (j < 64),  "fits 64");
      if (j < 512) chk(int'(p512) == (int'(hp512) + j) % 512, "index 512");
      if (j < 64)  chk(int'(p64)  == (int'(hp64)  + j) % 64,  "index 64");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
