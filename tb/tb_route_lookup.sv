// End-to-end testbench of route_lookup: two routing tables searched at once
// over a pool of 8 search units (interleaved: odd units table 0, even units
// table 1), 8 columns each. Parameters can be overridden for the full-size
// run (see tb_route_lookup_full).
//
// For each table it builds a random set of nested IPv4 prefixes with a
// default route, turns it into a range table, lays it out over the columns
// (leaving free slots at the end of every column) and loads it with WRITE and
// NEWRANGE. It then runs the table maintenance of the range scheme with the
// engine's own commands:
//   port change    READCOL + CHANGECOL over the prefix's entries
//   column spill   move the last entry of a column to the front of the next
//                  (READ, READ, READCOL, FORWARD, WRITE, NEWRANGE); done once
//                  per round to rebalance and whenever an insert hits a full
//                  column
//   prefix insert  READCOL + FORWARD + WRITE per new boundary entry, then
//                  CHANGECOL for the entries the new prefix takes over
//   prefix delete  CHANGECOL back to the covering prefix, then READCOL +
//                  BACKWARD (+ NEWRANGE) to drop redundant entries
//   column opening merge the last two columns, move whole columns one
//                  place right with READCOL + WRITECOL, and split the
//                  fullest column over the freed place (NEWRANGE, BACKWARD)
// After loading and after every change it reads back the whole matrix with
// READ and sends searches to every prefix boundary and to random addresses.
// Each search result is compared with a brute-force longest prefix match
// over the prefix list; each READ with the testbench's copy of the matrix;
// every token's latency with 2*log2(COLS) + 2*(units of its table).
// It counts the mechanisms: searches on both tables in the same cycle,
// BACKWARD stalls at the entry gate, spills, inserts, deletes, port changes,
// whole-column moves.
module tb_route_lookup #(
  parameter int unsigned COLS   = 8,
  parameter int unsigned UNITS  = 8,
  parameter int unsigned NPFX   = 7,     // random prefixes per table
  parameter int unsigned ROUNDS = 3,     // change rounds per table
  parameter int unsigned NRAND  = 200    // random searches per check
);
  import lr_pkg::*;

  localparam int unsigned NPIPE = 2;
  localparam int unsigned ROWS  = UNITS / 2;       // units per table
  localparam int unsigned LAT   = 2 * $clog2(COLS) + 2 * ROWS;

  typedef struct {
    addr_t             a;
    int                len;
    logic [PORT_W-1:0] port;
  } pfx_t;

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

  route_lookup #(.COLS(COLS), .UNITS(UNITS), .NPIPE(NPIPE)) dut (.*);

  int checks = 0, failures = 0;
  int n_stall = 0, n_dual = 0, n_spill = 0, n_insert = 0, n_delete = 0, n_change = 0;
  int n_search = 0;
  int n_move = 0, n_open = 0;

  pfx_t   pf  [NPIPE][$];
  entry_t mat [NPIPE][COLS][ROWS];
  int     cnt [NPIPE][COLS];
  item_t  q   [NPIPE][$];     // waiting to enter
  item_t  fly [NPIPE][$];     // in the pipeline
  logic [TAG_W-1:0] tagc [NPIPE];

  // ---------------- helpers ----------------
  function automatic addr_t pmask(int len);
    return (len == 0) ? 32'd0 : ~((32'd1 << (32 - len)) - 32'd1);
  endfunction

  function automatic addr_t pstart(pfx_t x);
    return x.a & pmask(x.len);
  endfunction

  function automatic addr_t pend(pfx_t x);
    return (x.a & pmask(x.len)) | ~pmask(x.len);
  endfunction

  function automatic int unit_of(int p, int r);   // 1-based unit number
    return 2 * r + p + 1;
  endfunction

  // longest prefix match over the prefix list: index into pf[p]
  function automatic int lpm(int p, addr_t x);
    int best;
    best = -1;
    for (int i = 0; i < pf[p].size(); i++) begin
      if (x >= pstart(pf[p][i]) && x <= pend(pf[p][i]))
        if (best < 0 || pf[p][i].len > pf[p][best].len) best = i;
    end
    return best;
  endfunction

  // ---------------- driver and monitor ----------------
  task automatic push(int p, cmd_t c);
    item_t it;
    c.tag = tagc[p];
    tagc[p] = tagc[p] + 1'b1;
    it = '{c: c, chk_port: 1'b0, port: '0, chk_data: 1'b0, data: '0, t_acc: 0};
    if (c.op == OP_SEARCH) begin
      int b;
      b = lpm(p, c.key);
      it.chk_port = 1'b1;
      it.port = pf[p][b].port;
    end
    if (c.op == OP_READ) begin
      int cc, rr;
      cc = int'(c.m);
      rr = (int'(c.j) - 1 - p) / 2;
      it.chk_data = 1'b1;
      it.data = mat[p][cc][rr];
    end
    q[p].push_back(it);
  endtask

  function automatic cmd_t mk(op_e op, int m, int j, int k);
    cmd_t c;
    c = '0;
    c.op = op;
    c.m = IDX_W'(m);
    c.j = NUM_W'(j);
    c.k = NUM_W'(k);
    return c;
  endfunction

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
          it.t_acc = $time + 4;    // the rising edge that accepts it
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
            if (res[gp].op != it.c.op || res[gp].tag != it.c.tag) begin
              failures++;
              $display("FAIL: table %0d order: op %0d tag %0d, expected op %0d tag %0d",
                       gp, res[gp].op, res[gp].tag, it.c.op, it.c.tag);
            end
            if (it.chk_port && (!res[gp].found || res[gp].dest != it.port)) begin
              failures++;
              $display("FAIL: table %0d search %h: found %0b port %0d, expected port %0d",
                       gp, it.c.key, res[gp].found, res[gp].dest, it.port);
            end
            if (it.chk_data && res[gp].data != it.data) begin
              failures++;
              $display("FAIL: table %0d READ(%0d,%0d): %h expected %h",
                       gp, it.c.m, it.c.j, res[gp].data, it.data);
            end
            checks++;
            // result valid after the LAT-th rising edge; sampled 7 later
            if (($time - it.t_acc - 7) / 10 + 1 != LAT) begin
              failures++;
              $display("FAIL: table %0d latency %0d, expected %0d", gp,
                       ($time - it.t_acc - 7) / 10 + 1, LAT);
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

  // ---------------- table building ----------------
  task automatic make_prefixes(int p);
    pfx_t x;
    pf[p].delete();
    x = '{a: 32'd0, len: 0, port: PORT_W'(100 + p)};
    pf[p].push_back(x);
    while (pf[p].size() < NPFX + 1) begin
      int lens [5] = '{8, 12, 16, 20, 24};
      bit dup;
      x.len  = lens[$urandom_range(4, 0)];
      x.a    = {8'(10 + $urandom_range(2, 0)), 8'($urandom_range(3, 0) * 16), 16'($urandom)};
      x.a    = x.a & pmask(x.len);
      x.port = PORT_W'($urandom_range(4000, 1));
      dup = 1'b0;
      foreach (pf[p][i]) if (pf[p][i].len == x.len && pstart(pf[p][i]) == x.a) dup = 1'b1;
      if (!dup) pf[p].push_back(x);
    end
  endtask

  // sorted range table of the prefix list, split up to at least COLS entries
  task automatic range_table(int p, output entry_t e [$]);
    addr_t b [$];
    addr_t u [$];
    e.delete();
    foreach (pf[p][i]) begin
      if (pstart(pf[p][i]) != 0) b.push_back(pstart(pf[p][i]) - 1);
      b.push_back(pend(pf[p][i]));
    end
    while (b.size() < COLS) b.push_back($urandom);
    b.sort();
    foreach (b[i]) if (u.size() == 0 || u[u.size()-1] != b[i]) u.push_back(b[i]);
    while (u.size() < COLS) begin   // split further (rare)
      u.push_back($urandom);
      u.sort();
    end
    foreach (u[i]) begin
      int w;
      w = lpm(p, u[i]);
      e.push_back('{ip: u[i], len: LEN_W'(pf[p][w].len), port: pf[p][w].port});
    end
  endtask

  task automatic load(int p);
    entry_t e [$];
    int n;
    range_table(p, e);
    n = e.size();
    if (n > int'(COLS * (ROWS - 1))) begin
      failures++;
      $display("FAIL: table %0d does not fit", p);
    end
    for (int c = 0; c < int'(COLS); c++) begin
      int lo, hi;
      lo = c * n / int'(COLS);
      hi = (c + 1) * n / int'(COLS);
      cnt[p][c] = hi - lo;
      for (int r = 0; r < int'(ROWS); r++) begin
        cmd_t cm;
        mat[p][c][r] = (r < hi - lo) ? e[lo + r] : e[hi - 1];
        cm = mk(OP_WRITE, c, unit_of(p, r), 0);
        cm.entry = mat[p][c][r];
        push(p, cm);
      end
      begin
        cmd_t cm;
        cm = mk(OP_NEWRANGE, c, 0, 0);
        cm.entry = e[hi - 1];
        push(p, cm);
      end
    end
  endtask

  // ---------------- checks ----------------

  task automatic check_all(int p);
    drain(p);
    for (int c = 0; c < int'(COLS); c++)
      for (int r = 0; r < int'(ROWS); r++)
        push(p, mk(OP_READ, c, unit_of(p, r), 0));
    foreach (pf[p][i]) begin
      addr_t pts [4];
      pts = '{pstart(pf[p][i]), pend(pf[p][i]), pstart(pf[p][i]) - 1, pend(pf[p][i]) + 1};
      foreach (pts[k]) begin
        cmd_t cm;
        cm = mk(OP_SEARCH, 0, 0, 0);
        cm.key = pts[k];
        push(p, cm);
        n_search++;
      end
    end
    for (int i = 0; i < int'(NRAND); i++) begin
      cmd_t cm;
      cm = mk(OP_SEARCH, 0, 0, 0);
      cm.key = ($urandom_range(1, 0) == 1) ? {8'(10 + $urandom_range(2, 0)), 24'($urandom)} : $urandom;
      push(p, cm);
      n_search++;
    end
    drain(p);
  endtask

  // ---------------- maintenance ----------------
  // CHANGECOL over the entries in [s, e] whose length is in the given set
  task automatic change_range(int p, addr_t s, addr_t e, int oldlen, int newlen,
                              logic [PORT_W-1:0] port);
    for (int c = 0; c < int'(COLS); c++) begin
      int rmin, rmax;
      rmin = -1;
      rmax = -1;
      for (int r = 0; r < cnt[p][c]; r++) begin
        if (mat[p][c][r].ip >= s && mat[p][c][r].ip <= e && int'(mat[p][c][r].len) == oldlen) begin
          if (rmin < 0) rmin = r;
          rmax = r;
        end
      end
      if (rmin >= 0) begin
        cmd_t cm;
        if (rmax == cnt[p][c] - 1) rmax = int'(ROWS) - 1;   // padding copies too
        push(p, mk(OP_READCOL, c, 0, 0));
        cm = mk(OP_CHANGECOL, c, unit_of(p, rmin), unit_of(p, rmax));
        cm.len = LEN_W'(oldlen);
        cm.newlen = LEN_W'(newlen);
        cm.p = port;
        push(p, cm);
        for (int r = rmin; r <= rmax; r++) begin
          if (int'(mat[p][c][r].len) == oldlen) begin
            mat[p][c][r].len = LEN_W'(newlen);
            mat[p][c][r].port = port;
          end
        end
      end
    end
  endtask

  task automatic port_change(int p);
    int i;
    logic [PORT_W-1:0] np;
    i = $urandom_range(pf[p].size() - 1, 1);
    np = PORT_W'($urandom_range(4000, 1));
    change_range(p, pstart(pf[p][i]), pend(pf[p][i]), pf[p][i].len, pf[p][i].len, np);
    pf[p][i].port = np;
    n_change++;
  endtask

  // move the last entry of column c to the front of column c+1
  task automatic spill(int p, int c);
    cmd_t cm;
    entry_t tmp, tmp2;
    int rl;
    rl   = cnt[p][c] - 1;
    tmp  = mat[p][c][rl];
    tmp2 = mat[p][c][rl-1];
    push(p, mk(OP_READ, c, unit_of(p, rl), 0));
    push(p, mk(OP_READ, c, unit_of(p, rl - 1), 0));
    push(p, mk(OP_READCOL, c + 1, 0, 0));
    push(p, mk(OP_FORWARD, c + 1, 1, UNITS));
    cm = mk(OP_WRITE, c + 1, unit_of(p, 0), 0);
    cm.entry = tmp;
    push(p, cm);
    cm = mk(OP_NEWRANGE, c, 0, 0);
    cm.entry = tmp2;
    push(p, cm);
    for (int r = ROWS - 1; r > 0; r--) mat[p][c+1][r] = mat[p][c+1][r-1];
    mat[p][c+1][0] = tmp;
    cnt[p][c+1]++;
    cnt[p][c]--;
    n_spill++;
  endtask

  // Open a column: merge the last column into the one before it, copy
  // columns c..COLS-2 one column to the right with READCOL + WRITECOL, then
  // keep the first half of column c there and the second half in column c+1
  // (NEWRANGE, then READCOL + BACKWARD to drop the copied first half).
  // Each bound is lowered before its column is overwritten, so the table
  // answers correctly between any two of these commands.
  task automatic open_column(int p);
    int c, h, l;
    cmd_t cm;
    l = int'(COLS) - 1;
    if (cnt[p][l-1] + cnt[p][l] > int'(ROWS)) return;
    c = -1;
    for (int i = 0; i < l - 1; i++)
      if (cnt[p][i] >= 2 && (c < 0 || cnt[p][i] > cnt[p][c])) c = i;
    if (c < 0) return;
    // merge
    for (int r = cnt[p][l-1]; r < int'(ROWS); r++) begin
      int i;
      i = r - cnt[p][l-1];
      mat[p][l-1][r] = (i < cnt[p][l]) ? mat[p][l][i] : mat[p][l][cnt[p][l]-1];
      cm = mk(OP_WRITE, l - 1, unit_of(p, r), 0);
      cm.entry = mat[p][l-1][r];
      push(p, cm);
    end
    cm = mk(OP_NEWRANGE, l - 1, 0, 0);
    cm.entry = mat[p][l][cnt[p][l]-1];
    push(p, cm);
    cnt[p][l-1] += cnt[p][l];
    // shift right
    for (int d = l; d > c; d--) begin
      cm = mk(OP_NEWRANGE, d, 0, 0);
      cm.entry = mat[p][d-1][cnt[p][d-1]-1];
      push(p, cm);
      push(p, mk(OP_READCOL, d - 1, 0, 0));
      push(p, mk(OP_WRITECOL, d, 0, 0));
      for (int r = 0; r < int'(ROWS); r++) mat[p][d][r] = mat[p][d-1][r];
      cnt[p][d] = cnt[p][d-1];
      n_move++;
    end
    // split
    h = cnt[p][c] / 2;
    cm = mk(OP_NEWRANGE, c, 0, 0);
    cm.entry = mat[p][c][h-1];
    push(p, cm);
    cnt[p][c] = h;
    for (int k = 0; k < h; k++) begin
      push(p, mk(OP_READCOL, c + 1, 0, 0));
      push(p, mk(OP_BACKWARD, c + 1, unit_of(p, 0), unit_of(p, ROWS - 2)));
      for (int r = 0; r < int'(ROWS) - 1; r++) mat[p][c+1][r] = mat[p][c+1][r+1];
      cnt[p][c+1]--;
    end
    n_open++;
  endtask

  // position of the first real entry with ip >= x
  task automatic find(int p, addr_t x, output int fc, output int fr);
    fc = -1;
    fr = -1;
    for (int c = 0; c < int'(COLS) && fc < 0; c++)
      for (int r = 0; r < cnt[p][c] && fc < 0; r++)
        if (mat[p][c][r].ip >= x) begin
          fc = c;
          fr = r;
        end
  endtask

  // add one boundary entry if missing; returns 0 when there is no room
  task automatic add_boundary(int p, addr_t x, output bit ok);
    int c, r;
    cmd_t cm;
    entry_t ne;
    ok = 1'b1;
    find(p, x, c, r);
    if (mat[p][c][r].ip == x) return;
    if (cnt[p][c] == int'(ROWS)) begin
      if (c == int'(COLS) - 1 || cnt[p][c+1] >= int'(ROWS) - 1 || r == int'(ROWS) - 1) begin
        ok = 1'b0;
        return;
      end
      spill(p, c);
    end
    ne = '{ip: x, len: mat[p][c][r].len, port: mat[p][c][r].port};
    push(p, mk(OP_READCOL, c, 0, 0));
    push(p, mk(OP_FORWARD, c, unit_of(p, r + 1), unit_of(p, ROWS - 1)));
    cm = mk(OP_WRITE, c, unit_of(p, r), 0);
    cm.entry = ne;
    push(p, cm);
    for (int k = ROWS - 1; k > r; k--) mat[p][c][k] = mat[p][c][k-1];
    mat[p][c][r] = ne;
    cnt[p][c]++;
  endtask

  // rebalance: spill one column whose neighbour has room
  task automatic rebalance(int p);
    int start;
    start = $urandom_range(COLS - 2, 0);
    for (int i = 0; i < int'(COLS) - 1; i++) begin
      int c;
      c = (start + i) % (int'(COLS) - 1);
      if (cnt[p][c] >= 2 && cnt[p][c+1] < int'(ROWS) - 1) begin
        spill(p, c);
        return;
      end
    end
  endtask

  task automatic insert(int p);
    pfx_t x;
    bit ok, dup;
    int lens [3] = '{12, 20, 28};
    for (int tries = 0; tries < 20; tries++) begin
      x.len  = lens[$urandom_range(2, 0)];
      x.a    = {8'(10 + $urandom_range(2, 0)), 8'($urandom_range(3, 0) * 16), 16'($urandom)} & pmask(x.len);
      x.port = PORT_W'($urandom_range(4000, 1));
      dup = 1'b0;
      foreach (pf[p][i]) if (pf[p][i].len == x.len && pstart(pf[p][i]) == x.a) dup = 1'b1;
      if (dup) continue;
      begin
        int c1, r1, c2, r2, need;
        // room check: both boundaries must fit
        find(p, pstart(x) - 1, c1, r1);
        find(p, pend(x), c2, r2);
        need = (mat[p][c1][r1].ip != pstart(x) - 1) + (mat[p][c2][r2].ip != pend(x));
        if (c1 == c2 && need == 2 && cnt[p][c1] >= int'(ROWS) - 1) continue;
      end
      add_boundary(p, pstart(x) - 1, ok);
      if (!ok) continue;
      add_boundary(p, pend(x), ok);
      if (!ok) begin
        $display("note: table %0d could not place end of %h/%0d", p, x.a, x.len);
        continue;
      end
      // the new prefix takes over every entry in its range with a shorter length
      for (int l = 0; l < x.len; l++)
        change_range(p, pstart(x), pend(x), l, x.len, x.port);
      pf[p].push_back(x);
      n_insert++;
      return;
    end
  endtask

  task automatic delete_pfx(int p);
    int i, w;
    pfx_t x;
    i = $urandom_range(pf[p].size() - 1, 1);
    x = pf[p][i];
    pf[p].delete(i);
    // the longest remaining prefix that contains the deleted one
    w = 0;
    foreach (pf[p][n])
      if (pf[p][n].len < x.len && pstart(x) >= pstart(pf[p][n]) && pstart(x) <= pend(pf[p][n])
          && pf[p][n].len > pf[p][w].len) w = n;
    change_range(p, pstart(x), pend(x), x.len, pf[p][w].len, pf[p][w].port);
    // drop boundary entries that now repeat their successor
    for (int k = 0; k < 2; k++) begin
      addr_t bnd;
      int c, r, cn, rn;
      bnd = (k == 0) ? pstart(x) - 1 : pend(x);
      if (k == 0 && pstart(x) == 0) continue;
      find(p, bnd, c, r);
      if (c < 0 || mat[p][c][r].ip != bnd || cnt[p][c] < 2) continue;
      if (bnd == 32'hFFFF_FFFF) continue;
      find(p, bnd + 1, cn, rn);
      if (mat[p][cn][rn].len != mat[p][c][r].len || mat[p][cn][rn].port != mat[p][c][r].port) continue;
      push(p, mk(OP_READCOL, c, 0, 0));
      push(p, mk(OP_BACKWARD, c, unit_of(p, r), unit_of(p, ROWS - 2)));
      for (int rr = r; rr < int'(ROWS) - 1; rr++) mat[p][c][rr] = mat[p][c][rr+1];
      cnt[p][c]--;
      if (r == cnt[p][c]) begin
        cmd_t cm;
        cm = mk(OP_NEWRANGE, c, 0, 0);
        cm.entry = mat[p][c][r-1];
        push(p, cm);
      end
    end
    n_delete++;
  endtask

  // ---------------- main ----------------
  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int u = 0; u < int'(UNITS); u++) unit_pipe[u] = u[0];
    tagc = '{default: '0};
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int gp = 0; gp < int'(NPIPE); gp++) begin
      make_prefixes(gp);
      load(gp);
    end
    fork
      check_all(0);
      check_all(1);
    join
    for (int k = 0; k < int'(ROUNDS); k++) begin
      for (int gp = 0; gp < int'(NPIPE); gp++) begin
        port_change(gp);
        rebalance(gp);
        open_column(gp);
        insert(gp);
        delete_pfx(gp);
        insert(gp);
      end
      fork
        check_all(0);
        check_all(1);
      join
    end
    repeat (LAT + 4) @(posedge clk);
    $display("searches %0d, dual-table cycles %0d, stalls %0d, spills %0d, inserts %0d, deletes %0d, port changes %0d, column moves %0d (%0d openings)",
             n_search, n_dual, n_stall, n_spill, n_insert, n_delete, n_change, n_move, n_open);
    checks += 7;
    if (n_dual == 0)   begin failures++; $display("FAIL: no simultaneous searches"); end
    if (n_stall == 0)  begin failures++; $display("FAIL: no BACKWARD stall"); end
    if (n_spill == 0)  begin failures++; $display("FAIL: no column spill"); end
    if (n_insert == 0) begin failures++; $display("FAIL: no insert"); end
    if (n_delete == 0) begin failures++; $display("FAIL: no delete"); end
    if (n_change == 0) begin failures++; $display("FAIL: no port change"); end
    if (n_move == 0)   begin failures++; $display("FAIL: no column move"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
