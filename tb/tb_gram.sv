// tb_gram: self-checking test of the graphic memory.
//
// A 64-word memory is filled with random words, read back in random order
// and compared with a copy kept by the bench. It also checks the one-clock
// read latency, that rdata holds while re is low, and that a read and a
// write of the same address in one cycle return the old word.
module tb_gram;
  localparam int W = 16, D = 64, AW = 6;

  logic clk = 1'b0;
  logic we, re;
  logic [AW-1:0] waddr, raddr;
  logic [W-1:0] wdata, rdata;
  logic [W-1:0] ref_mem [D];

  int checks = 0, failures = 0;

  gram #(.WORD_W(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL t=%0t %s", $time, msg);
    end
  endtask

  initial begin
    we = 0; re = 0; waddr = '0; raddr = '0; wdata = '0;
    @(posedge clk);
    for (int a = 0; a < D; a++) begin
      we = 1; waddr = AW'(a); wdata = W'($urandom); ref_mem[a] = wdata;
      @(posedge clk); #1;
    end
    we = 0;
    for (int k = 0; k < 200; k++) begin
      int a;
      a = $urandom % D;
      re = 1; raddr = AW'(a);
      @(posedge clk); #1;
      check(rdata == ref_mem[a], $sformatf("read %0d", a));
      // hold while re is low
      re = 0; raddr = AW'($urandom);
      @(posedge clk); #1;
      check(rdata == ref_mem[a], "rdata must hold while re is low");
      // read-during-write: old data
      if (k % 10 == 0) begin
        re = 1; we = 1; raddr = AW'(a); waddr = AW'(a); wdata = ~ref_mem[a];
        @(posedge clk); #1;
        check(rdata == ref_mem[a], "read during write returns old word");
        ref_mem[a] = ~ref_mem[a];
        we = 0; re = 1;
        @(posedge clk); #1;
        check(rdata == ref_mem[a], "new word after write");
        re = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
