// tb_vote_ram: self-checking test of the voting memory.
//
// Random writes and reads against a reference array: read data must appear
// one cycle after the address, and a read of the address being written at
// the same edge must return the old word.
module tb_vote_ram;
  logic clk = 1'b0;
  logic we;
  logic [9:0] waddr, raddr;
  logic [9:0] wdata, q;
  int checks = 0;
  int failures = 0;
  int ref_mem[1024];
  int n_rdw = 0;

  always #5 clk = ~clk;

  vote_ram dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int expq;
    // fill the whole memory first
    for (int a = 0; a < 1024; a++) begin
      @(negedge clk);
      we = 1'b1; waddr = 10'(a); wdata = 10'($urandom); raddr = '0;
      ref_mem[a] = int'(wdata);
    end
    @(negedge clk);
    we = 1'b0;
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      we = 1'($urandom);
      waddr = 10'($urandom_range(0, 15));
      raddr = ($urandom_range(0, 3) == 0) ? waddr : 10'($urandom_range(0, 15));
      wdata = 10'($urandom);
      expq = ref_mem[raddr];
      if (we && raddr == waddr) n_rdw++;
      if (we) ref_mem[waddr] = int'(wdata);
      @(negedge clk);
      checks++;
      if (int'(q) != expq) begin
        failures++;
        if (failures < 10) $display("FAIL: q=%0d exp %0d", q, expq);
      end
      we = 1'b0;
    end
    checks++;
    if (n_rdw == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
