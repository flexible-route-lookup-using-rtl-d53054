// Testbench for lr_sram: random reads and writes on a 16-word memory,
// checked against a model array. Checks the one-cycle read latency, that
// rdata holds while re is low, and the write-first result of a read and a
// write to the same address in one cycle.
module tb_lr_sram;
  localparam int unsigned DEPTH = 16;
  localparam int unsigned WIDTH = 50;
  localparam int unsigned AW = $clog2(DEPTH);

  logic             clk = 1'b0;
  logic             re, we;
  logic [AW-1:0]    raddr, waddr;
  logic [WIDTH-1:0] rdata, wdata;
  logic [WIDTH-1:0] model [DEPTH];
  logic [WIDTH-1:0] expd;
  int checks = 0, failures = 0, n_bypass = 0;
  bit               have_read = 1'b0;  // rdata is undefined before the first read

  always #5 clk = ~clk;

  lr_sram #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    re = 0; we = 0; raddr = 0; waddr = 0; wdata = 0;
    // initialise every word
    for (int a = 0; a < int'(DEPTH); a++) begin
      @(negedge clk);
      we = 1; waddr = AW'(a); wdata = WIDTH'({$urandom, $urandom});
      model[a] = wdata;
    end
    @(negedge clk);
    we = 0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      re    = $urandom_range(1, 0) == 1;
      we    = $urandom_range(1, 0) == 1;
      raddr = AW'($urandom);
      waddr = ($urandom_range(3, 0) == 0) ? raddr : AW'($urandom);
      wdata = WIDTH'({$urandom, $urandom});
      if (re) expd = (we && waddr == raddr) ? wdata : model[raddr];
      if (re) have_read = 1'b1;
      if (re && we && waddr == raddr) n_bypass++;
      if (we) model[waddr] = wdata;
      @(posedge clk);
      #1;
      if (!have_read) continue;
      checks++;
      if (rdata !== expd) begin
        failures++;
        $display("FAIL: addr %0d got %h exp %h", raddr, rdata, expd);
      end
    end
    checks++;
    if (n_bypass == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
