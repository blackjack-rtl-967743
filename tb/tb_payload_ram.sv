// tb_payload_ram: self-checking test of the per-thread payload RAMs.
//
// Random writes from both threads, often to the same entry index in the same
// cycle, against two reference arrays: a read must return what that thread
// last wrote to the entry, never the other thread's payload.
module tb_payload_ram;
  localparam int E = 32, PW = 64;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [1:0] wr_en;
  logic [4:0] wr_idx [2], rd_idx [2];
  logic [PW-1:0] wr_data [2], rd_data [2];
  payload_ram #(.ENTRIES(E), .PW(PW)) dut (.*);
  logic [PW-1:0] refm [2][E];

  task automatic chk(input logic c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    wr_en = 0;
    for (int t = 0; t < 2; t++) begin wr_idx[t] = 0; rd_idx[t] = 0; wr_data[t] = 0; end
    // fill both
    for (int e = 0; e < E; e++) begin
      @(negedge clk);
      wr_en = 2'b11;
      for (int t = 0; t < 2; t++) begin
        wr_idx[t] = 5'(e); wr_data[t] = {$urandom, $urandom};
        refm[t][e] = wr_data[t];
      end
    end
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      wr_en = 2'($urandom);
      wr_idx[0] = 5'($urandom); wr_idx[1] = ($urandom_range(0, 1)) ? wr_idx[0] : 5'($urandom);
      for (int t = 0; t < 2; t++) begin
        wr_data[t] = {$urandom, $urandom};
        rd_idx[t]  = 5'($urandom);
      end
      #1;
      for (int t = 0; t < 2; t++) chk(rd_data[t] == refm[t][rd_idx[t]], "read returns this thread's payload");
      for (int t = 0; t < 2; t++) if (wr_en[t]) refm[t][wr_idx[t]] = wr_data[t];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
