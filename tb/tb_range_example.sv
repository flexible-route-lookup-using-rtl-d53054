// Directed testbench: the small range tables of the range-search scheme's
// worked example, on route_lookup with 2 columns and 4 search units per table
// (units 1-4 table 0, units 5-8 table 1).
//
// Table 0 starts from the prefixes 0.0.0.0/0 -> 1, 10.0.0.0/8 -> 2,
// 10.10.1.0/24 -> 3, 10.10.2.0/24 -> 4, whose range table is
//   9.255.255.255 1/0, 10.10.0.255 2/8, 10.10.1.255 3/24, 10.10.2.255 4/24,
//   10.255.255.255 2/8, 255.255.255.255 1/0          (port/length)
// It then adds 10.10.0.0/16 -> 5 (two new entries with FORWARD+WRITE, two
// entries taken over with CHANGECOL) and deletes 10.0.0.0/8 (CHANGECOL back
// to the default route, two redundant entries removed with BACKWARD). After
// each step every position is read back and compared with the expected
// table, and searches are checked.
// Table 1 holds 0.0.0.0/0 -> 1, 10.0.0.0/8 -> 2, 10.120.50.0/24 -> 3 and
// checks that 10.120.50.34 takes the longer prefix.
module tb_range_example;
  import lr_pkg::*;

  localparam int unsigned COLS = 2, UNITS = 8, NPIPE = 2, ROWS = 4;
  localparam int unsigned LAT = 2 * 1 + 2 * ROWS;

  typedef struct {
    cmd_t   c;
    bit     chk;
    logic [PORT_W-1:0] port;
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

  int checks = 0, failures = 0, n_stall = 0;
  item_t q [NPIPE][$];
  item_t fly [NPIPE][$];
  time   tq [NPIPE][$];

  function automatic addr_t ip(int a, int b, int c, int d);
    return {8'(a), 8'(b), 8'(c), 8'(d)};
  endfunction

  function automatic entry_t en(addr_t a, int port, int len);
    return '{ip: a, len: LEN_W'(len), port: PORT_W'(port)};
  endfunction

  function automatic cmd_t mk(op_e op, int m, int j, int k);
    cmd_t c;
    c = '0;
    c.op = op;
    c.m = IDX_W'(m);
    c.j = NUM_W'(j);
    c.k = NUM_W'(k);
    return c;
  endfunction

  function automatic int un(int p, int r);
    return p * int'(ROWS) + r + 1;
  endfunction

  task automatic put(int p, cmd_t c);
    q[p].push_back('{c: c, chk: 1'b0, port: '0, chk_data: 1'b0, data: '0});
  endtask

  task automatic wr(int p, int m, int r, entry_t e);
    cmd_t c;
    c = mk(OP_WRITE, m, un(p, r), 0);
    c.entry = e;
    put(p, c);
  endtask

  task automatic nr(int p, int m, addr_t a);
    cmd_t c;
    c = mk(OP_NEWRANGE, m, 0, 0);
    c.entry.ip = a;
    put(p, c);
  endtask

  task automatic chg(int p, int m, int j, int k, int len, int newlen, int port);
    cmd_t c;
    c = mk(OP_CHANGECOL, m, un(p, j), un(p, k));
    c.len = LEN_W'(len);
    c.newlen = LEN_W'(newlen);
    c.p = PORT_W'(port);
    put(p, c);
  endtask

  task automatic srch(int p, addr_t a, int port);
    cmd_t c;
    c = mk(OP_SEARCH, 0, 0, 0);
    c.key = a;
    q[p].push_back('{c: c, chk: 1'b1, port: PORT_W'(port), chk_data: 1'b0, data: '0});
  endtask

  task automatic rd(int p, int m, int r, entry_t e);
    q[p].push_back('{c: mk(OP_READ, m, un(p, r), 0), chk: 1'b0, port: '0, chk_data: 1'b1, data: e});
  endtask

  task automatic drain(int p);
    while (q[p].size() != 0 || fly[p].size() != 0) @(posedge clk);
  endtask

  for (genvar gp = 0; gp < NPIPE; gp++) begin : g_drv
    initial begin
      cmd_valid[gp] = 1'b0;
      cmd[gp] = '0;
      forever begin
        @(negedge clk);
        cmd_valid[gp] = (q[gp].size() != 0);
        if (cmd_valid[gp]) cmd[gp] = q[gp][0].c;
        #1;
        if (stall[gp]) n_stall++;
        if (cmd_valid[gp] && cmd_ready[gp]) begin
          fly[gp].push_back(q[gp].pop_front());
          tq[gp].push_back($time + 4);
        end
      end
    end
    initial begin
      forever begin
        @(negedge clk);
        #2;
        if (rst_n && res[gp].valid) begin
          item_t it;
          time   t;
          checks++;
          if (fly[gp].size() == 0) begin
            failures++;
            $display("FAIL: unexpected result");
          end else begin
            it = fly[gp].pop_front();
            t  = tq[gp].pop_front();
            if (res[gp].op != it.c.op) failures++;
            if (it.chk && (!res[gp].found || res[gp].dest != it.port)) begin
              failures++;
              $display("FAIL: table %0d search %0d.%0d.%0d.%0d -> port %0d, expected %0d", gp,
                       it.c.key[31:24], it.c.key[23:16], it.c.key[15:8], it.c.key[7:0],
                       res[gp].dest, it.port);
            end
            if (it.chk_data && res[gp].data != it.data) begin
              failures++;
              $display("FAIL: table %0d READ(%0d,%0d) = %h, expected %h", gp, it.c.m, it.c.j,
                       res[gp].data, it.data);
            end
            checks++;
            if (($time - t - 7) / 10 + 1 != LAT) failures++;
          end
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
    entry_t t0 [2][ROWS];
    entry_t t1 [2][ROWS];
    for (int u = 0; u < int'(UNITS); u++) unit_pipe[u] = (u >= int'(ROWS));
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // ---- table 0: initial range table
    t0 = '{'{en(ip(9,255,255,255), 1, 0), en(ip(10,10,0,255), 2, 8),
             en(ip(10,10,1,255), 3, 24), en(ip(10,10,1,255), 3, 24)},
           '{en(ip(10,10,2,255), 4, 24), en(ip(10,255,255,255), 2, 8),
             en(ip(255,255,255,255), 1, 0), en(ip(255,255,255,255), 1, 0)}};
    // ---- table 1
    t1 = '{'{en(ip(9,255,255,255), 1, 0), en(ip(10,120,49,255), 2, 8),
             en(ip(10,120,50,255), 3, 24), en(ip(10,120,50,255), 3, 24)},
           '{en(ip(10,255,255,255), 2, 8), en(ip(255,255,255,255), 1, 0),
             en(ip(255,255,255,255), 1, 0), en(ip(255,255,255,255), 1, 0)}};
    for (int m = 0; m < 2; m++) begin
      for (int r = 0; r < int'(ROWS); r++) begin
        wr(0, m, r, t0[m][r]);
        wr(1, m, r, t1[m][r]);
      end
    end
    nr(0, 0, ip(10,10,1,255));
    nr(0, 1, ip(255,255,255,255));
    nr(1, 0, ip(10,120,50,255));
    nr(1, 1, ip(255,255,255,255));
    srch(0, ip(10,10,1,7), 3);
    srch(0, ip(10,10,2,200), 4);
    srch(0, ip(10,10,3,0), 2);
    srch(0, ip(10,0,0,0), 2);
    srch(0, ip(9,255,255,255), 1);
    srch(0, ip(11,0,0,0), 1);
    srch(1, ip(10,120,50,34), 3);
    srch(1, ip(10,120,51,34), 2);
    srch(1, ip(10,1,1,1), 2);
    srch(1, ip(192,168,1,1), 1);
    drain(0);
    drain(1);

    // ---- add 10.10.0.0/16 -> 5
    put(0, mk(OP_READCOL, 0, 0, 0));
    put(0, mk(OP_FORWARD, 0, un(0, 2), un(0, 3)));
    wr(0, 0, 1, en(ip(10,9,255,255), 2, 8));
    put(0, mk(OP_READCOL, 1, 0, 0));
    put(0, mk(OP_FORWARD, 1, un(0, 2), un(0, 3)));
    wr(0, 1, 1, en(ip(10,10,255,255), 2, 8));
    put(0, mk(OP_READCOL, 0, 0, 0));
    chg(0, 0, 2, 2, 8, 16, 5);
    put(0, mk(OP_READCOL, 1, 0, 0));
    chg(0, 1, 1, 1, 8, 16, 5);
    t0 = '{'{en(ip(9,255,255,255), 1, 0), en(ip(10,9,255,255), 2, 8),
             en(ip(10,10,0,255), 5, 16), en(ip(10,10,1,255), 3, 24)},
           '{en(ip(10,10,2,255), 4, 24), en(ip(10,10,255,255), 5, 16),
             en(ip(10,255,255,255), 2, 8), en(ip(255,255,255,255), 1, 0)}};
    for (int m = 0; m < 2; m++) for (int r = 0; r < int'(ROWS); r++) rd(0, m, r, t0[m][r]);
    srch(0, ip(10,10,0,5), 5);
    srch(0, ip(10,10,1,7), 3);
    srch(0, ip(10,10,2,7), 4);
    srch(0, ip(10,10,3,1), 5);
    srch(0, ip(10,10,255,255), 5);
    srch(0, ip(10,9,0,0), 2);
    srch(0, ip(10,11,0,0), 2);
    srch(0, ip(11,0,0,0), 1);
    drain(0);

    // ---- delete 10.0.0.0/8: its entries go back to 0.0.0.0/0
    put(0, mk(OP_READCOL, 0, 0, 0));
    chg(0, 0, 0, 3, 8, 0, 1);
    put(0, mk(OP_READCOL, 1, 0, 0));
    chg(0, 1, 0, 3, 8, 0, 1);
    // 9.255.255.255 and 10.255.255.255 now repeat their successors
    put(0, mk(OP_READCOL, 0, 0, 0));
    put(0, mk(OP_BACKWARD, 0, un(0, 0), un(0, 2)));
    put(0, mk(OP_READCOL, 1, 0, 0));
    put(0, mk(OP_BACKWARD, 1, un(0, 2), un(0, 2)));
    t0 = '{'{en(ip(10,9,255,255), 1, 0), en(ip(10,10,0,255), 5, 16),
             en(ip(10,10,1,255), 3, 24), en(ip(10,10,1,255), 3, 24)},
           '{en(ip(10,10,2,255), 4, 24), en(ip(10,10,255,255), 5, 16),
             en(ip(255,255,255,255), 1, 0), en(ip(255,255,255,255), 1, 0)}};
    for (int m = 0; m < 2; m++) for (int r = 0; r < int'(ROWS); r++) rd(0, m, r, t0[m][r]);
    srch(0, ip(10,5,0,0), 1);
    srch(0, ip(9,1,2,3), 1);
    srch(0, ip(10,10,0,1), 5);
    srch(0, ip(10,10,1,1), 3);
    srch(0, ip(10,10,2,9), 4);
    srch(0, ip(10,10,9,9), 5);
    srch(0, ip(10,200,0,0), 1);
    drain(0);

    checks++;
    if (n_stall == 0) begin
      failures++;
      $display("FAIL: no BACKWARD stall seen");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
