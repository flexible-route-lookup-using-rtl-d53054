// Full-size run of route_lookup at its default size: 61 search units of 8192
// positions, two tables (units 1,3,..,61 table 0: 31 units; units 2,..,60
// table 1: 30 units), 13-level range search.
//
// Each table is loaded with a synthetic range table that fills every column
// but its last row: entry i ends at (i+1)*step-1 (the last at
// 255.255.255.255) with port (i*2654435761 >> 20) mod 4096, 24-bit length.
// The load is one WRITE per position and one NEWRANGE per column, both tables
// at once (about 254000 cycles). Then:
//   - random searches on both tables, checked against the entry index
//     computed from the address (first i with (i+1)*step-1 >= address);
//   - in one column per table: READCOL+CHANGECOL (port change), READCOL+
//     FORWARD+WRITE (insert a split entry), READCOL+BACKWARD (remove it
//     again, held at the entry gate), each checked by searches and READ.
// Latency is checked on every token: 26 + 2 * units of the table.
module tb_route_lookup_full;
  import lr_pkg::*;

  localparam int unsigned COLS  = 8192;
  localparam int unsigned UNITS = 61;
  localparam int unsigned NPIPE = 2;
  localparam int unsigned NSRCH = 20000;

  typedef struct {
    cmd_t   c;
    bit     chk_port;
    logic [PORT_W-1:0] port;
    bit     chk_data;
    entry_t data;
    time    t_acc;
  } item_t;

  logic    clk = 1'b0, rst_n = 1'b0;
  logic    unit_pipe [UNITS];
  logic    cmd_valid [NPIPE];
  logic    cmd_ready [NPIPE];
  cmd_t    cmd       [NPIPE];
  result_t res       [NPIPE];
  logic    stall     [NPIPE];

  always #5 clk = ~clk;

  route_lookup dut (.*);

  int checks = 0, failures = 0, n_stall = 0, n_dual = 0;
  int rows [NPIPE];
  int lat  [NPIPE];
  longint unsigned step [NPIPE];
  item_t q   [NPIPE][$];
  item_t fly [NPIPE][$];

  function automatic logic [PORT_W-1:0] port_of(longint unsigned i);
    return PORT_W'(((i * 64'd2654435761) >> 20) & 64'hFFF);
  endfunction

  function automatic addr_t ip_of(int p, longint unsigned i);
    longint unsigned n;
    n = longint'(COLS) * longint'(rows[p] - 1);
    return (i == n - 1) ? 32'hFFFF_FFFF : addr_t'((i + 1) * step[p] - 1);
  endfunction

  function automatic entry_t entry_of(int p, int c, int r);
    longint unsigned i;
    int rr;
    rr = (r < rows[p] - 1) ? r : rows[p] - 2;     // last row repeats
    i = longint'(c) * longint'(rows[p] - 1) + longint'(rr);
    return '{ip: ip_of(p, i), len: LEN_W'(24), port: port_of(i)};
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

  task automatic push(int p, cmd_t c, bit cp, logic [PORT_W-1:0] pt, bit cd, entry_t d);
    item_t it;
    it = '{c: c, chk_port: cp, port: pt, chk_data: cd, data: d, t_acc: 0};
    q[p].push_back(it);
  endtask

  task automatic search(int p, addr_t key, logic [PORT_W-1:0] pt);
    cmd_t c;
    c = mk(OP_SEARCH, 0, 0, 0);
    c.key = key;
    push(p, c, 1'b1, pt, 1'b0, '0);
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
        if (q[gp].size() != 0) begin
          cmd_valid[gp] = 1'b1;
          cmd[gp] = q[gp][0].c;
        end else begin
          cmd_valid[gp] = 1'b0;
        end
        #1;
        if (stall[gp]) n_stall++;
        if (cmd_valid[gp] && cmd_ready[gp]) begin
          item_t it;
          it = q[gp].pop_front();
          it.t_acc = $time + 4;
          fly[gp].push_back(it);
        end
      end
    end

    initial begin
      forever begin
        @(negedge clk);
        #2;
        if (rst_n && res[gp].valid) begin
          item_t it;
          checks++;
          if (fly[gp].size() == 0) begin
            failures++;
            $display("FAIL: table %0d unexpected result", gp);
          end else begin
            it = fly[gp].pop_front();
            if (res[gp].op != it.c.op) begin
              failures++;
              $display("FAIL: table %0d order", gp);
            end
            if (it.chk_port && (!res[gp].found || res[gp].dest != it.port)) begin
              failures++;
              $display("FAIL: table %0d search %h: port %0d expected %0d", gp, it.c.key,
                       res[gp].dest, it.port);
            end
            if (it.chk_data && res[gp].data != it.data) begin
              failures++;
              $display("FAIL: table %0d READ %h expected %h", gp, res[gp].data, it.data);
            end
            checks++;
            if (($time - it.t_acc - 7) / 10 + 1 != lat[gp]) begin
              failures++;
              $display("FAIL: table %0d latency", gp);
            end
          end
        end
      end
    end
  end

  always @(posedge clk) begin
    if (cmd_valid[0] && cmd_ready[0] && cmd_valid[1] && cmd_ready[1]
        && cmd[0].op == OP_SEARCH && cmd[1].op == OP_SEARCH) n_dual++;
  end

  task automatic load(int p);
    for (int c = 0; c < int'(COLS); c++) begin
      cmd_t cm;
      for (int r = 0; r < rows[p]; r++) begin
        cm = mk(OP_WRITE, c, 2 * r + p + 1, 0);
        cm.entry = entry_of(p, c, r);
        push(p, cm, 0, '0, 0, '0);
      end
      cm = mk(OP_NEWRANGE, c, 0, 0);
      cm.entry = entry_of(p, c, rows[p] - 2);
      push(p, cm, 0, '0, 0, '0);
      while (q[p].size() > 64) @(posedge clk);
    end
  endtask

  task automatic searches(int p);
    longint unsigned n;
    n = longint'(COLS) * longint'(rows[p] - 1);
    for (int s = 0; s < int'(NSRCH); s++) begin
      addr_t key;
      longint unsigned i;
      key = $urandom;
      i = (longint'(key) + 1 + step[p] - 1) / step[p];
      i = (i == 0) ? 0 : i - 1;
      if (i > n - 1) i = n - 1;
      search(p, key, port_of(i));
      while (q[p].size() > 64) @(posedge clk);
    end
  endtask

  // port change, insert and removal in one column
  task automatic edits(int p);
    int c, r;
    cmd_t cm;
    entry_t e, s;
    c = $urandom_range(COLS - 2, 0);
    r = $urandom_range(rows[p] - 3, 0);
    e = entry_of(p, c, r);
    // CHANGECOL: every row of column c with length 24 gets port 5, length 25
    push(p, mk(OP_READCOL, c, 0, 0), 0, '0, 0, '0);
    cm = mk(OP_CHANGECOL, c, 1, UNITS);
    cm.len = 24;
    cm.newlen = 25;
    cm.p = 5;
    push(p, cm, 0, '0, 0, '0);
    search(p, e.ip, 5);
    push(p, mk(OP_READ, c, 2 * r + p + 1, 0), 0, '0, 1, '{ip: e.ip, len: 25, port: 5});
    // insert a split entry s in front of row r (last row is padding)
    s = '{ip: e.ip - 32'd7, len: 6'd30, port: 12'd77};
    push(p, mk(OP_READCOL, c, 0, 0), 0, '0, 0, '0);
    push(p, mk(OP_FORWARD, c, 2 * (r + 1) + p + 1, UNITS), 0, '0, 0, '0);
    cm = mk(OP_WRITE, c, 2 * r + p + 1, 0);
    cm.entry = s;
    push(p, cm, 0, '0, 0, '0);
    search(p, e.ip - 32'd7, 77);
    search(p, e.ip - 32'd6, 5);
    push(p, mk(OP_READ, c, 2 * (r + 1) + p + 1, 0), 0, '0, 1, '{ip: e.ip, len: 25, port: 5});
    // remove it again
    push(p, mk(OP_READCOL, c, 0, 0), 0, '0, 0, '0);
    push(p, mk(OP_BACKWARD, c, 2 * r + p + 1, 2 * (rows[p] - 2) + p + 1), 0, '0, 0, '0);
    search(p, e.ip - 32'd7, 5);
    push(p, mk(OP_READ, c, 2 * r + p + 1, 0), 0, '0, 1, '{ip: e.ip, len: 25, port: 5});
    drain(p);
  endtask

  initial begin
    repeat (1500000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int u = 0; u < int'(UNITS); u++) unit_pipe[u] = u[0];
    for (int p = 0; p < int'(NPIPE); p++) begin
      rows[p] = (p == 0) ? (int'(UNITS) + 1) / 2 : int'(UNITS) / 2;
      lat[p]  = 2 * $clog2(COLS) + 2 * rows[p];
      step[p] = (64'd1 << 32) / (longint'(COLS) * longint'(rows[p] - 1));
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    fork
      begin load(0); drain(0); end
      begin load(1); drain(1); end
    join
    $display("loaded at %0t", $time);
    fork
      begin searches(0); drain(0); edits(0); end
      begin searches(1); drain(1); edits(1); end
    join
    repeat (100) @(posedge clk);
    $display("dual-table search cycles %0d, BACKWARD stalls %0d", n_dual, n_stall);
    checks += 2;
    if (n_dual == 0)  begin failures++; $display("FAIL: no simultaneous searches"); end
    if (n_stall == 0) begin failures++; $display("FAIL: no BACKWARD stall"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
