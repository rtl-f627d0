// tb_sp_ram: checks the simple dual-port RAM at the shared-memory size
// (171 x 24) and the correlation-memory size (101 x 26): writes random words,
// reads them back with one clock of read latency, checks that rdata holds
// while re is low and that a read in the cycle of a write to the same address
// returns the old word.
module tb_sp_ram;
  logic clk = 0;
  always #5 clk = ~clk;
  logic we = 0, re = 0;
  logic [7:0] waddr = 0, raddr = 0;
  logic [23:0] wdata = 0, rdata;
  logic we2 = 0, re2 = 0;
  logic [6:0] waddr2 = 0, raddr2 = 0;
  logic [25:0] wdata2 = 0, rdata2;
  sdp_ram #(.DEPTH(171), .WIDTH(24)) dut (.clk, .we, .waddr, .wdata, .re, .raddr, .rdata);
  sdp_ram #(.DEPTH(101), .WIDTH(26)) dut2 (.clk, .we(we2), .waddr(waddr2), .wdata(wdata2),
    .re(re2), .raddr(raddr2), .rdata(rdata2));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [23:0] m1 [171];
  logic [25:0] m2 [101];
  initial begin
    for (int i = 0; i < 171; i++) begin
      @(negedge clk);
      we = 1; waddr = 8'(i); wdata = 24'($urandom); m1[i] = wdata;
      we2 = (i < 101); waddr2 = 7'(i); wdata2 = 26'($urandom); if (i < 101) m2[i] = wdata2;
    end
    @(negedge clk); we = 0; we2 = 0;
    for (int i = 170; i >= 0; i--) begin
      @(negedge clk); re = 1; raddr = 8'(i); re2 = (i < 101); raddr2 = 7'(i);
      @(negedge clk); re = 0; re2 = 0;
      check(rdata == m1[i], $sformatf("word %0d of 171", i));
      if (i < 101) check(rdata2 == m2[i], $sformatf("word %0d of 101", i));
      @(negedge clk);
      check(rdata == m1[i], "rdata holds");
    end
    // read during write of the same address gives the old word
    @(negedge clk); we = 1; waddr = 8'd5; wdata = ~m1[5]; re = 1; raddr = 8'd5;
    @(negedge clk); we = 0; re = 0;
    check(rdata == m1[5], "read-before-write");
    @(negedge clk); re = 1;
    @(negedge clk); re = 0;
    check(rdata == ~m1[5], "new word after the write");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
