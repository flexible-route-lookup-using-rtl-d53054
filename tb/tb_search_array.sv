// Testbench for search_array: 5 search units of 8 positions shared by two
// pipelines. For three different partitions of the units it fills the
// units, then drives both pipelines at once with random searches and update
// commands, and checks every token leaving each pipeline against the
// reference model, including the latency of 2 cycles per unit owned.
// BACKWARD is spaced three cycles behind READCOL on its pipeline.
module tb_search_array;
  import lr_pkg::*;
  import lr_model_pkg::*;

  localparam int unsigned COLS  = 8;
  localparam int unsigned UNITS = 5;
  localparam int unsigned NPIPE = 2;

  logic clk = 1'b0, rst_n = 1'b0;
  logic unit_pipe [UNITS];
  tok_t tok_i [NPIPE];
  tok_t tok_o [NPIPE];

  always #5 clk = ~clk;

  search_array #(.COLS(COLS), .UNITS(UNITS), .NPIPE(NPIPE)) dut (.*);

  int checks = 0, failures = 0, cycle = 0;
  lr_model model;
  result_t exp_q [NPIPE][$];
  int      time_q [NPIPE][$];
  int      since_rc [NPIPE];
  int      lat [NPIPE];
  int      n_op [16];

  always @(posedge clk) cycle <= cycle + 1;

  // one cycle of input on both pipelines; op NOP means no token
  task automatic step(cmd_t c [NPIPE], int unsigned idx [NPIPE]);
    for (int p = 0; p < int'(NPIPE); p++) begin
      tok_t t;
      t = '0;
      if (c[p].op == OP_BACKWARD && since_rc[p] < 3) c[p].op = OP_NOP;  // hold back
      if (c[p].op != OP_NOP) begin
        t.valid = 1'b1;
        t.cmd   = c[p];
        t.index = IDX_W'(idx[p]);
        exp_q[p].push_back(model.apply(p, c[p], idx[p]));
        time_q[p].push_back(cycle);
        n_op[c[p].op]++;
      end
      since_rc[p] = (c[p].op == OP_READCOL) ? 1 : (since_rc[p] < 3 ? since_rc[p] + 1 : 3);
      tok_i[p] <= t;
    end
    @(posedge clk);
  endtask

  for (genvar p = 0; p < NPIPE; p++) begin : g_chk
    always @(posedge clk) begin
      if (rst_n && tok_o[p].valid) begin
        result_t got, e;
        got       = '0;
        got.valid = 1'b1;
        got.op    = tok_o[p].cmd.op;
        got.tag   = tok_o[p].cmd.tag;
        got.found = tok_o[p].found;
        got.dest  = tok_o[p].dest;
        got.data  = tok_o[p].data;
        checks++;
        if (exp_q[p].size() == 0) begin
          failures++;
          $display("FAIL: pipe %0d unexpected token", p);
        end else begin
          e = exp_q[p].pop_front();
          if (!lr_model::same(got, e, 1'b0)) begin
            failures++;
            $display("FAIL: pipe %0d op=%0d got found=%0b dest=%0h data=%0h exp found=%0b dest=%0h data=%0h",
                     p, e.op, got.found, got.dest, got.data, e.found, e.dest, e.data);
          end
          checks++;
          if (cycle - time_q[p].pop_front() != lat[p] + 1) begin
            failures++;
            $display("FAIL: pipe %0d latency", p);
          end
        end
      end
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cmd_t        c [NPIPE];
    int unsigned ix [NPIPE];
    logic        cfg [3][UNITS] = '{'{0, 1, 0, 1, 1}, '{0, 0, 0, 0, 1}, '{1, 0, 1, 1, 0}};
    op_e         ops [8] = '{OP_SEARCH, OP_WRITE, OP_READ, OP_READCOL, OP_FORWARD,
                             OP_BACKWARD, OP_WRITECOL, OP_CHANGECOL};
    model = new(COLS, UNITS, NPIPE);
    for (int p = 0; p < int'(NPIPE); p++) begin
      tok_i[p]    = '0;
      since_rc[p] = 3;
    end
    foreach (unit_pipe[u]) unit_pipe[u] = 1'b0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int k = 0; k < 3; k++) begin
      // reconfigure while idle
      for (int p = 0; p < int'(NPIPE); p++) c[p] = '0;
      repeat (2 * UNITS + 2) step(c, ix);
      for (int u = 0; u < int'(UNITS); u++) begin
        unit_pipe[u]     = cfg[k][u];
        model.pipe_of[u] = cfg[k][u];
      end
      for (int p = 0; p < int'(NPIPE); p++) lat[p] = 2 * int'(model.units_in(p));
      // fill: every unit through the pipeline that owns it
      for (int u = 0; u < int'(UNITS); u++) begin
        for (int m = 0; m < int'(COLS); m++) begin
          for (int p = 0; p < int'(NPIPE); p++) begin
            c[p] = rand_cmd(OP_WRITE, COLS, UNITS);
            c[p].j = NUM_W'(u + 1);
            c[p].m = IDX_W'(m);
            c[p].entry.ip = 32'(m * 1000 + u * 100 + p * 10);
            ix[p] = 0;
          end
          step(c, ix);
        end
      end
      for (int n = 0; n < 3000; n++) begin
        for (int p = 0; p < int'(NPIPE); p++) begin
          c[p] = rand_cmd(ops[$urandom_range(7, 0)], COLS, UNITS);
          if ($urandom_range(1, 0) == 1) c[p].op = OP_SEARCH;
          if ($urandom_range(7, 0) == 0) c[p].op = OP_NOP;
          c[p].key = 32'($urandom_range(COLS * 1000 + 500, 0));
          if (c[p].op == OP_CHANGECOL && $urandom_range(1, 0) == 1) begin
            int u;
            u = $urandom_range(UNITS - 1, 0);
            c[p].len = model.colq[u].len;
          end
          ix[p] = $urandom_range(COLS - 1, 0);
        end
        step(c, ix);
      end
    end
    for (int p = 0; p < int'(NPIPE); p++) c[p] = '0;
    repeat (2 * UNITS + 3) step(c, ix);
    for (int p = 0; p < int'(NPIPE); p++) begin
      checks++;
      if (exp_q[p].size() != 0) begin
        failures++;
        $display("FAIL: pipe %0d lost %0d tokens", p, exp_q[p].size());
      end
    end
    for (int o = 1; o <= 9; o++) begin
      if (o == int'(OP_NEWRANGE)) continue;
      checks++;
      if (n_op[o] == 0) begin
        failures++;
        $display("FAIL: op %0d never sent", o);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
