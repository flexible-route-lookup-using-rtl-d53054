// Testbench for search_unit: three units chained as rows 1..3 of one
// pipeline (COLS = 8). It fills the matrix with WRITE, then sends a random
// mix of searches and all update commands, and compares every token leaving
// row 3 with the reference model, including the 6-cycle latency (2 per unit).
// BACKWARD is sent at least three cycles after the last READCOL, as the
// pipeline entry gate would.
module tb_search_unit;
  import lr_pkg::*;
  import lr_model_pkg::*;

  localparam int unsigned COLS = 8;
  localparam int unsigned N    = 3;
  localparam int unsigned LAT  = 2 * N;

  logic   clk = 1'b0;
  logic   rst_n = 1'b0;
  tok_t   t [N+1];
  entry_t col [N];
  entry_t nxt [N];

  always #5 clk = ~clk;

  for (genvar i = 0; i < N; i++) begin : g_u
    search_unit #(.COLS(COLS), .UNIT_NUM(i + 1)) dut (
      .clk(clk), .rst_n(rst_n), .tok_i(t[i]), .tok_o(t[i+1]),
      .col_o(col[i]), .next_col(nxt[i]));
    if (i < N - 1) begin : g_n
      assign nxt[i] = col[i+1];
    end else begin : g_l
      assign nxt[i] = '0;
    end
  end

  int checks = 0, failures = 0;
  int cycle = 0;
  int since_rc = 3;
  lr_model model;
  result_t exp_q [$];
  int      time_q [$];
  int      n_op [16];

  always @(posedge clk) cycle <= cycle + 1;

  // send one token, spacing BACKWARD behind READCOL
  task automatic send(cmd_t c, int unsigned idx);
    while (c.op == OP_BACKWARD && since_rc < 3) begin
      t[0] <= '0;
      @(posedge clk);
      since_rc++;
    end
    t[0]       <= '0;
    t[0].valid <= 1'b1;
    t[0].cmd   <= c;
    t[0].index <= IDX_W'(idx);
    exp_q.push_back(model.apply(0, c, idx));
    time_q.push_back(cycle);
    n_op[c.op]++;
    since_rc = (c.op == OP_READCOL) ? 1 : (since_rc < 3 ? since_rc + 1 : 3);
    @(posedge clk);
  endtask

  // check the tokens leaving the last unit
  always @(posedge clk) begin
    if (rst_n && t[N].valid) begin
      result_t got, e;
      got       = '0;
      got.valid = 1'b1;
      got.op    = t[N].cmd.op;
      got.tag   = t[N].cmd.tag;
      got.found = t[N].found;
      got.dest  = t[N].dest;
      got.index = t[N].index;
      got.data  = t[N].data;
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL: unexpected token op=%0d", got.op);
      end else begin
        e = exp_q.pop_front();
        if (!lr_model::same(got, e, 1'b0)) begin
          failures++;
          $display("FAIL: op=%0d tag=%0d got found=%0b dest=%0h data=%0h exp found=%0b dest=%0h data=%0h",
                   e.op, e.tag, got.found, got.dest, got.data, e.found, e.dest, e.data);
        end
        checks++;
        if (cycle - time_q.pop_front() != LAT + 1) begin
          failures++;
          $display("FAIL: latency %0d", cycle);
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
    op_e  ops [9] = '{OP_SEARCH, OP_WRITE, OP_READ, OP_READCOL, OP_FORWARD,
                      OP_BACKWARD, OP_WRITECOL, OP_CHANGECOL, OP_NOP};
    model = new(COLS, N, 1);
    t[0] = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    // fill the matrix: column c, row r gets a sorted address
    for (int u = 1; u <= int'(N); u++) begin
      for (int m = 0; m < int'(COLS); m++) begin
        c = rand_cmd(OP_WRITE, COLS, N);
        c.j = NUM_W'(u);
        c.m = IDX_W'(m);
        c.entry.ip = 32'(m * 1000 + u * 100);
        send(c, 0);
      end
    end
    // a fixed shift: READCOL / FORWARD / BACKWARD back to back
    c = rand_cmd(OP_READCOL, COLS, N); c.m = 2; send(c, 0);
    c = rand_cmd(OP_FORWARD, COLS, N); c.m = 3; c.j = 2; c.k = 3; send(c, 0);
    c = rand_cmd(OP_READCOL, COLS, N); c.m = 4; send(c, 0);
    c = rand_cmd(OP_BACKWARD, COLS, N); c.m = 5; c.j = 1; c.k = 2; send(c, 0);
    c = rand_cmd(OP_READCOL, COLS, N); c.m = 5; send(c, 0);
    c = rand_cmd(OP_CHANGECOL, COLS, N); c.m = 5; c.j = 1; c.k = 3; c.len = model.colq[1].len; send(c, 0);
    for (int u = 1; u <= int'(N); u++) begin
      c = rand_cmd(OP_READ, COLS, N); c.j = NUM_W'(u); c.m = 3; send(c, 0);
      c = rand_cmd(OP_READ, COLS, N); c.j = NUM_W'(u); c.m = 5; send(c, 0);
    end
    // random mix
    for (int n = 0; n < 3000; n++) begin
      c = rand_cmd(ops[$urandom_range(8, 0)], COLS, N);
      if ($urandom_range(1, 0) == 1) c.op = OP_SEARCH;
      if (c.op == OP_SEARCH) c.key = 32'($urandom_range(COLS * 1000 + 500, 0));
      if ($urandom_range(3, 0) == 0) c.entry.ip = 32'($urandom_range(COLS * 1000, 0));
      send(c, $urandom_range(COLS - 1, 0));
    end
    t[0] <= '0;
    repeat (LAT + 4) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("FAIL: %0d tokens lost", exp_q.size());
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
