// Binary range search: picks the column of the range-table matrix in which
// the linear search down the search units will find the address.
//
// The range table holds, for every column c, the last address of that column
// (the entry in its last row), in increasing order; NEWRANGE(m, ENTRY) sets
// the bound of column m to ENTRY.ip. A search returns the first column whose
// bound is >= SearchIP. The document gives the function (a small binary range
// search, about 26 cycles for 8192 columns) but not the structure; this is a
// pipelined binary search with one level per bit of the column number.
//
// Level b (b = LVLS-1 down to 0) decides bit b of the column. With the
// partial column idx (bits above b set), it compares SearchIP with the bound
// of column idx + 2^b - 1 and sets bit b if SearchIP is larger. The bounds
// probed by level b are exactly the columns whose low bits end in b ones and
// a zero, so each bound is stored once, in the memory of its level, at
// address m >> (b+1); level b holds COLS >> (b+1) bounds. The bound of the
// last column (all ones) is never probed: the last column takes every
// address above the others and its last entry should be 255.255.255.255.
//
// Timing: two cycles per level (synchronous memory read, then compare), so
// 2*log2(COLS) cycles from tok_i to tok_o, 26 for 8192 columns. One token per
// cycle. Commands pass through with their fields unchanged; NEWRANGE writes
// its level's memory while passing it, so searches behind it see the new
// bound. tok_o.index carries the column, dest/found/data start at zero.
module range_search
  import lr_pkg::*;
#(
  parameter int unsigned COLS = 8192   // columns, a power of two >= 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic valid_i,
  input  cmd_t cmd_i,
  output tok_t tok_o
);

  localparam int unsigned LVLS = $clog2(COLS);

  // Level l (counted from the top) takes its token from the input (l = 0)
  // or from q[l-1]; b[l] is its compare stage and q[l] its output register.
  tok_t b [LVLS];
  tok_t q [LVLS];
  tok_t in_tok;

  always_comb begin
    in_tok       = '0;
    in_tok.valid = valid_i;
    in_tok.cmd   = cmd_i;
  end

  // number of trailing ones of a column number = level that stores its bound
  function automatic int unsigned trailing_ones(logic [IDX_W-1:0] m);
    int unsigned n;
    n = 0;
    for (int i = 0; i < IDX_W; i++) begin
      if (m[i] && n == i) n = i + 1;
    end
    return n;
  endfunction

  for (genvar l = 0; l < LVLS; l++) begin : g_lvl
    localparam int unsigned BIT   = LVLS - 1 - l;
    localparam int unsigned DEPTH = COLS >> (BIT + 1);
    localparam int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1;

    tok_t              a;
    logic [ADDR_W-1:0] bound;
    logic              rd_en, wr_en;
    logic [AW-1:0]     rd_addr, wr_addr;

    if (l == 0) begin : g_in
      assign a = in_tok;
    end else begin : g_prev
      assign a = q[l-1];
    end

    always_comb begin
      rd_en   = a.valid && (a.cmd.op == OP_SEARCH);
      rd_addr = AW'(a.index >> (BIT + 1));
      wr_en   = b[l].valid && (b[l].cmd.op == OP_NEWRANGE)
                && (trailing_ones(b[l].cmd.m & IDX_W'(COLS - 1)) == BIT);
      wr_addr = AW'(b[l].cmd.m >> (BIT + 1));
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        b[l] <= '0;
        q[l] <= '0;
      end else begin
        b[l] <= a;
        q[l] <= b[l];
        if (b[l].valid && b[l].cmd.op == OP_SEARCH && b[l].cmd.key > bound)
          q[l].index <= b[l].index | (IDX_W'(1) << BIT);
      end
    end

    lr_sram #(.DEPTH(DEPTH), .WIDTH(ADDR_W)) u_lvl (
      .clk   (clk),
      .re    (rd_en),
      .raddr (rd_addr),
      .rdata (bound),
      .we    (wr_en),
      .waddr (wr_addr),
      .wdata (b[l].cmd.entry.ip)
    );
  end

  assign tok_o = q[LVLS-1];

  initial begin
    assert (COLS >= 2 && (COLS & (COLS - 1)) == 0)
      else $error("range_search: COLS must be a power of two >= 2");
  end

endmodule
