// Testbench for range_search with 16 columns (4 levels, 8-cycle latency).
// It loads sorted column bounds with NEWRANGE, then sends random searches,
// NEWRANGE updates that keep the bounds sorted, and other commands that must
// pass through untouched. Each search's column is compared with a linear scan
// of the bounds (first bound >= address), and every token's latency is
// checked.
module tb_range_search;
  import lr_pkg::*;
  import lr_model_pkg::*;

  localparam int unsigned COLS = 16;
  localparam int unsigned LAT  = 2 * $clog2(COLS);

  logic clk = 1'b0, rst_n = 1'b0;
  logic valid_i = 1'b0;
  cmd_t cmd_i = '0;
  tok_t tok_o;
  int checks = 0, failures = 0, cycle = 0, n_upd = 0, n_last = 0;
  lr_model model;
  result_t exp_q [$];
  cmd_t    cmd_q [$];
  int      time_q [$];

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  range_search #(.COLS(COLS)) dut (.*);

  task automatic send(cmd_t c);
    int unsigned col;
    col = (c.op == OP_SEARCH) ? model.range_col(0, c.key) : 0;
    if (c.op == OP_SEARCH && col == COLS - 1) n_last++;
    exp_q.push_back(model.apply(0, c, col));
    cmd_q.push_back(c);
    time_q.push_back(cycle);
    valid_i <= 1'b1;
    cmd_i   <= c;
    @(posedge clk);
  endtask

  task automatic idle();
    valid_i <= 1'b0;
    @(posedge clk);
  endtask

  always @(posedge clk) begin
    if (rst_n && tok_o.valid) begin
      result_t e;
      cmd_t    c;
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL: unexpected token");
      end else begin
        e = exp_q.pop_front();
        c = cmd_q.pop_front();
        if (tok_o.cmd != c || (c.op == OP_SEARCH && tok_o.index != e.index)
            || tok_o.found || tok_o.dest != 0) begin
          failures++;
          $display("FAIL: op=%0d key=%h got index %0d exp %0d got op %0d m %0d exp m %0d", c.op, c.key, tok_o.index, e.index, tok_o.cmd.op, tok_o.cmd.m, c.m);
        end
        checks++;
        if (cycle - time_q[0] != LAT + 1) begin
          failures++;
          $display("FAIL: latency %0d", cycle - time_q[0]);
        end
        begin
          void'(time_q.pop_front());
        end
      end
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cmd_t c;
    model = new(COLS, 1, 1);
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int m = 0; m < int'(COLS); m++) begin
      c = rand_cmd(OP_NEWRANGE, COLS, 1);
      c.m = IDX_W'(m);
      c.entry.ip = (m == int'(COLS) - 1) ? 32'hFFFF_FFFF : 32'((m + 1) * 32'h0C00_0000);
      send(c);
    end
    for (int n = 0; n < 4000; n++) begin
      int r;
      r = $urandom_range(9, 0);
      if (r < 7) begin
        c = rand_cmd(OP_SEARCH, COLS, 1);
        if ($urandom_range(3, 0) == 0) begin   // hit a bound exactly or just past it
          int b;
          b = $urandom_range(COLS - 2, 0);
          c.key = model.bound[0][b] + 32'($urandom_range(1, 0));
        end
        send(c);
      end else if (r < 9) begin
        int m;
        addr_t lo, hi;
        m  = $urandom_range(COLS - 2, 0);
        lo = (m == 0) ? 32'd0 : model.bound[0][m-1];
        hi = model.bound[0][m+1];
        c = rand_cmd(OP_NEWRANGE, COLS, 1);
        c.m = IDX_W'(m);
        c.entry.ip = lo + 32'(({$urandom} % (64'(hi) - 64'(lo) + 1)));
        send(c);
        n_upd++;
      end else begin
        c = rand_cmd(op_e'($urandom_range(9, 2)), COLS, 1);
        if (c.op == OP_NEWRANGE) c.op = OP_READ;
        send(c);
      end
      if ($urandom_range(3, 0) == 0) idle();
    end
    valid_i <= 1'b0;
    repeat (LAT + 3) @(posedge clk);
    checks++;
    if (exp_q.size() != 0 || n_upd == 0 || n_last == 0) begin
      failures++;
      $display("FAIL: left %0d, updates %0d, last-column hits %0d", exp_q.size(), n_upd, n_last);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
