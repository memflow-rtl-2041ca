// sram_bank_tb: writes random words through the write port, reads them back
// through the read port and checks the one-cycle read latency, that a read
// without re holds its data, and read-before-write on a same-address access.
module sram_bank_tb;
  localparam int unsigned W = 32, D = 1024;
  logic clk = 0;
  always #5 clk = ~clk;
  logic re, we;
  logic [9:0] raddr, waddr;
  logic [W-1:0] rdata, wdata;
  logic [W-1:0] model [D];
  int checks = 0, failures = 0;

  sram_bank #(.WORD_W(W), .DEPTH(D)) dut (.*);

  task automatic check(logic [W-1:0] got, logic [W-1:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    re = 0; we = 0; raddr = 0; waddr = 0; wdata = 0;
    // fill
    for (int a = 0; a < D; a++) begin
      @(negedge clk);
      we = 1; waddr = 10'(a); wdata = $urandom; model[a] = wdata;
    end
    @(negedge clk); we = 0;
    // random reads, checked one cycle later
    for (int n = 0; n < 2000; n++) begin
      int a;
      a = $urandom_range(D - 1);
      @(negedge clk); re = 1; raddr = 10'(a);
      @(negedge clk); re = 0;
      check(rdata, model[a], "read");
      // rdata holds without re
      @(negedge clk);
      check(rdata, model[a], "hold");
    end
    // same-address read and write: old word comes out, new word is stored
    for (int n = 0; n < 200; n++) begin
      int a;
      logic [W-1:0] nw;
      a = $urandom_range(D - 1);
      nw = $urandom;
      @(negedge clk); re = 1; raddr = 10'(a); we = 1; waddr = 10'(a); wdata = nw;
      @(negedge clk); re = 0; we = 0;
      check(rdata, model[a], "read-before-write");
      model[a] = nw;
      @(negedge clk); re = 1;
      @(negedge clk); re = 0;
      check(rdata, nw, "after write");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
