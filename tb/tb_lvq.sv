// tb_lvq: self-checking test of the Load Value Queue.
//
// 2000 leading loads (address, value) are written in program order, up to 4
// per cycle, into a 16-entry queue (the writer waits on wr_ready). Trailing
// lookups come in random order among the live entries, by virtual index:
// the value must be the one the leading load left, and rd_err must be set
// exactly when the trailing address differs (one lookup in eight is given a
// wrong address) or the index is not live. Entries are freed in program
// order; the queue must become full at times and be empty at the end.
module tb_lvq;
  import bj_pkg::*;
  localparam int W = 4, DEPTH = 16, N = 2000;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [W-1:0] wr_valid;
  word_t wr_addr [W], wr_data [W], rd_addr, rd_data;
  logic wr_ready, rd_valid, rd_hit, rd_err;
  vidx_t rd_v;
  logic [2:0] free_n;
  logic [4:0] count;
  lvq #(.W(W), .DEPTH(DEPTH)) dut (.*);

  task automatic chk(input logic c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic word_t A(int i); return word_t'(i) * 64'h9E37 + 64'h1000; endfunction
  function automatic word_t D(int i); return {32'(i), 32'hC0FFEE00 ^ 32'(i)}; endfunction

  int written = 0, freed = 0, fulls = 0, nerr = 0;
  int k, f;
  initial begin
    wr_valid = 0; rd_valid = 0; rd_v = 0; rd_addr = 0; free_n = 0;
    for (int i = 0; i < W; i++) begin wr_addr[i] = 0; wr_data[i] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    while (freed < N) begin
      @(negedge clk);
      // lookup checks (combinational)
      if (written > freed) begin
        int id; logic badaddr;
        id = $urandom_range(freed, written - 1);
        badaddr = ($urandom_range(0, 7) == 0);
        rd_valid = 1; rd_v = vidx_t'(id); rd_addr = badaddr ? A(id) ^ 64'h40 : A(id);
        #1;
        chk(rd_hit, "live index hits");
        chk(rd_data == D(id), "value from the leading load");
        chk(rd_err == badaddr, "address check");
        if (rd_err) nerr++;
        rd_v = vidx_t'(written); rd_addr = A(written); #1;
        chk(rd_err && !rd_hit, "index beyond tail is an error");
      end
      rd_valid = 0;
      // writes
      k = $urandom_range(0, W);
      wr_valid = '0;
      for (int l = 0; l < k && written + l < N; l++) begin
        wr_valid[l] = 1; wr_addr[l] = A(written + l); wr_data[l] = D(written + l);
      end
      // frees
      f = $urandom_range(0, W);
      if (f > written - freed) f = written - freed;
      free_n = 3'(f);
      #1;
      if (!wr_ready) fulls++;
      @(posedge clk);
      if (wr_ready) written += int'($countones(wr_valid));
      freed += f;
      #1;
      chk(int'(count) == written - freed, "occupancy");
    end
    chk(fulls > 0, "full queue happened");
    chk(nerr > 0, "address mismatches detected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (40000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
