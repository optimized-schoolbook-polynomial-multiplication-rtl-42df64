// tb_poly_ram: random traffic on both write ports and both read ports of a
// small RAM, compared with an array model; reads return the old word one
// cycle after the address and hold while re is low.
module tb_poly_ram;
  localparam int DEPTH = 64, WIDTH = 13;

  logic clk = 0;
  logic re0, re1, we0, we1;
  logic [5:0] raddr0, raddr1, waddr0, waddr1;
  logic [WIDTH-1:0] rdata0, rdata1, wdata0, wdata1;
  logic [WIDTH-1:0] model [DEPTH];
  logic [WIDTH-1:0] exp0, exp1;
  int checks = 0, failures = 0;

  poly_ram #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    re0 = 0; re1 = 0; we0 = 0; we1 = 0;
    raddr0 = '0; raddr1 = '0; waddr0 = '0; waddr1 = '0; wdata0 = '0; wdata1 = '0;
    // fill
    for (int k = 0; k < DEPTH; k += 2) begin
      @(negedge clk);
      we0 = 1; waddr0 = 6'(k);     wdata0 = WIDTH'($urandom);
      we1 = 1; waddr1 = 6'(k + 1); wdata1 = WIDTH'($urandom);
      model[k] = wdata0; model[k + 1] = wdata1;
    end
    @(negedge clk);
    we0 = 0; we1 = 0;
    re0 = 1; re1 = 1; raddr0 = 0; raddr1 = 1;
    exp0 = model[0]; exp1 = model[1];
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      checks += 2;
      if (rdata0 != exp0 || rdata1 != exp1) begin
        failures++;
        if (failures < 10) $display("FAIL k=%0d %0h/%0h %0h/%0h", k, rdata0, exp0, rdata1, exp1);
      end
      re0 = $urandom_range(3) != 0;
      re1 = $urandom_range(3) != 0;
      raddr0 = 6'($urandom); raddr1 = 6'($urandom);
      we0 = $urandom_range(1); we1 = $urandom_range(1);
      waddr0 = 6'($urandom); waddr1 = 6'($urandom);
      if (waddr1 == waddr0) waddr1 = waddr0 + 1'b1;
      wdata0 = WIDTH'($urandom); wdata1 = WIDTH'($urandom);
      // read-first: the word returned is the one before this edge's writes
      if (re0) exp0 = model[raddr0];
      if (re1) exp1 = model[raddr1];
      if (we0) model[waddr0] = wdata0;
      if (we1) model[waddr1] = wdata1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
