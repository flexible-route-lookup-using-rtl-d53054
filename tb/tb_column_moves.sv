// Directed testbench: the column data movements of the update commands, on
// route_lookup with 5 search units (all on table 0) and 16 columns.
//
// Every position (column m, unit r) is first written with a distinct entry.
// Then the sequence
//   READCOL(1); FORWARD(1, 3, 5)    column 1, rows 3..5 take rows 2..4
//   READCOL(3); BACKWARD(3, 3, 4)   column 3, rows 3..4 take rows 4..5
//   READCOL(5); WRITECOL(8)         column 8 becomes a copy of column 5
// is sent back to back (the entry gate holds the BACKWARD until its READCOL
// is far enough ahead), and the whole matrix is read back with READ and
// compared with the expected contents. Column and unit numbers are those of
// the commands: columns are memory addresses, units are numbered 1..5.
// Every token's latency is checked: 2*log2(16) + 2*5 = 18 cycles.
module tb_column_moves;
  import lr_pkg::*;

  localparam int unsigned COLS = 16, UNITS = 5, NPIPE = 2;
  localparam int unsigned LAT = 2 * $clog2(COLS) + 2 * UNITS;

  typedef struct {
    cmd_t   c;
    bit     chk_data;
    entry_t data;
  } item_t;

  logic    clk = 1'b0, rst_n = 1'b0;
  logic    unit_pipe [UNITS];
  logic    cmd_valid [NPIPE];
  logic    cmd_ready [NPIPE];
  cmd_t    cmd       [NPIPE];
  result_t res       [NPIPE];
  logic    stall     [NPIPE];

  always #5 clk = ~clk;

  route_lookup #(.COLS(COLS), .UNITS(UNITS), .NPIPE(NPIPE)) dut (.*);

  int     checks = 0, failures = 0, n_stall = 0;
  item_t  q [$];
  item_t  fly [$];
  time    tq [$];
  entry_t exp_m [COLS][UNITS];

  function automatic cmd_t mk(op_e op, int m, int j, int k);
    cmd_t c;
    c = '0;
    c.op = op;
    c.m = IDX_W'(m);
    c.j = NUM_W'(j);
    c.k = NUM_W'(k);
    return c;
  endfunction

  // distinct contents for column m, unit u (1-based)
  function automatic entry_t init_entry(int m, int u);
    return '{ip: {8'(m), 8'(u), 16'hA5C3}, len: LEN_W'(u), port: PORT_W'(m)};
  endfunction

  task automatic put(cmd_t c);
    q.push_back('{c: c, chk_data: 1'b0, data: '0});
  endtask

  task automatic drain();
    while (q.size() != 0 || fly.size() != 0) @(posedge clk);
  endtask

  // driver: table 0 only; table 1 owns no units and stays idle
  initial begin
    cmd_valid[0] = 1'b0;
    cmd_valid[1] = 1'b0;
    cmd[0] = '0;
    cmd[1] = '0;
    forever begin
      @(negedge clk);
      cmd_valid[0] = (q.size() != 0);
      if (cmd_valid[0]) cmd[0] = q[0].c;
      #1;
      if (stall[0]) n_stall++;
      if (cmd_valid[0] && cmd_ready[0]) begin
        fly.push_back(q.pop_front());
        tq.push_back($time + 4);       // the rising edge that accepts it
      end
    end
  end

  // monitor
  initial begin
    forever begin
      @(negedge clk);
      #2;
      if (rst_n && res[1].valid) begin
        failures++;
        $display("FAIL: result on the idle table");
      end
      if (rst_n && res[0].valid) begin
        item_t it;
        time   t;
        checks++;
        if (fly.size() == 0) begin
          failures++;
          $display("FAIL: unexpected result");
        end else begin
          it = fly.pop_front();
          t  = tq.pop_front();
          if (res[0].op != it.c.op) failures++;
          if (it.chk_data && res[0].data != it.data) begin
            failures++;
            $display("FAIL: READ(%0d,%0d) = %h, expected %h", it.c.m, it.c.j,
                     res[0].data, it.data);
          end
          checks++;
          if (int'(($time - t - 7) / 10 + 1) != int'(LAT)) begin
            failures++;
            $display("FAIL: latency %0d", ($time - t - 7) / 10 + 1);
          end
        end
      end
    end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int u = 0; u < int'(UNITS); u++) unit_pipe[u] = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    for (int m = 0; m < int'(COLS); m++)
      for (int u = 1; u <= int'(UNITS); u++) begin
        cmd_t c;
        c = mk(OP_WRITE, m, u, 0);
        c.entry = init_entry(m, u);
        put(c);
        exp_m[m][u-1] = init_entry(m, u);
      end

    put(mk(OP_READCOL, 1, 0, 0));
    put(mk(OP_FORWARD, 1, 3, 5));
    put(mk(OP_READCOL, 3, 0, 0));
    put(mk(OP_BACKWARD, 3, 3, 4));
    put(mk(OP_READCOL, 5, 0, 0));
    put(mk(OP_WRITECOL, 8, 0, 0));

    for (int u = 5; u >= 3; u--) exp_m[1][u-1] = exp_m[1][u-2];
    for (int u = 3; u <= 4; u++) exp_m[3][u-1] = exp_m[3][u];
    for (int u = 1; u <= 5; u++) exp_m[8][u-1] = exp_m[5][u-1];

    for (int m = 0; m < int'(COLS); m++)
      for (int u = 1; u <= int'(UNITS); u++)
        q.push_back('{c: mk(OP_READ, m, u, 0), chk_data: 1'b1, data: exp_m[m][u-1]});
    drain();

    checks++;
    if (n_stall == 0) begin
      failures++;
      $display("FAIL: BACKWARD was not held after its READCOL");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
