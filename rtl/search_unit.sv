// One search unit: one row of the range-table matrix and one step of the
// linear search.
//
// Search. The unit holds COLS range entries, one per column. A search token
// carries the SearchIP and the column index picked by the range search. The
// unit reads the entry of that column and, if no earlier unit has found a
// match and SearchIP <= entry.ip (the entry holds the last address of its
// range), replaces Destination with the entry's port and sets Found. Once
// Found is set, later units pass the result on unchanged. This is the
// structure of the document's search unit; the register stage between memory
// and comparator is this design's (the document mentions such registers but
// does not draw them).
//
// Update commands (document Sec. 4). The unit has a hard-wired 1-based number
// UNIT_NUM and a column register col_q (the document's "output flip flops" of
// the update path):
//   WRITE(m,j,E)     unit j writes E to position m
//   READ(m,j)        unit j puts the entry at m into the token's data field
//   READCOL(m)       every unit loads its entry at m into col_q
//   FORWARD(m,j,k)   units j..k write the previous unit's col_q to m; the
//                    previous unit's col_q travels with the token (data field)
//   BACKWARD(m,j,k)  units j..k write the next unit's col_q (next_col) to m
//   WRITECOL(m)      every unit writes its own col_q to m
//   CHANGECOL(m,j,k,len,newlen,p)  units j..k whose col_q.len == len write
//                    {col_q.ip, newlen, p} to m
//   NEWRANGE and NOP pass through.
//
// Timing. Two cycles per unit. Cycle A: the token is on tok_i, the memory is
// read. Cycle B: the token is in tok_b, compare, col_q load and every memory
// write happen, and tok_o is registered. A write in cycle B and the read of
// the following token in cycle A of the same clock hit the memory together;
// the memory is write-first, so tokens see each other in issue order. FORWARD,
// WRITECOL and CHANGECOL work directly behind READCOL. BACKWARD reads the next
// unit's col_q, which that unit loads two cycles later than this one, so a
// BACKWARD must enter the pipeline at least three cycles after its READCOL
// with no other READCOL in between (the entry gate, cmd_issue, enforces this).
module search_unit
  import lr_pkg::*;
#(
  parameter int unsigned COLS     = 8192,  // memory positions (M)
  parameter int unsigned UNIT_NUM = 1      // position in the pipeline, 1..R
) (
  input  logic   clk,
  input  logic   rst_n,
  input  tok_t   tok_i,     // from the previous unit's output register
  output tok_t   tok_o,     // output register
  output entry_t col_o,     // col_q, to the neighbours
  input  entry_t next_col   // col_q of the next unit of the same pipeline
);

  localparam int unsigned AW = (COLS > 1) ? $clog2(COLS) : 1;

  // ---------------- cycle A: memory read ----------------
  logic          rd_en;
  logic [AW-1:0] rd_addr;
  logic [$bits(entry_t)-1:0] rd_word;
  entry_t        rd_entry;

  always_comb begin
    rd_en   = tok_i.valid && (tok_i.cmd.op inside {OP_SEARCH, OP_READ, OP_READCOL});
    rd_addr = (tok_i.cmd.op == OP_SEARCH) ? tok_i.index[AW-1:0] : tok_i.cmd.m[AW-1:0];
  end

  tok_t tok_b;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) tok_b <= '0;
    else        tok_b <= tok_i;
  end

  // ---------------- cycle B: compare, update ----------------
  assign rd_entry = entry_t'(rd_word);

  logic   in_range, is_j, match;
  logic   we;
  entry_t wdata;
  entry_t col_q;
  tok_t   tok_n;

  always_comb begin
    in_range = (NUM_W'(UNIT_NUM) >= tok_b.cmd.j) && (NUM_W'(UNIT_NUM) <= tok_b.cmd.k);
    is_j     = (NUM_W'(UNIT_NUM) == tok_b.cmd.j);
    match    = 1'b0;
    we       = 1'b0;
    wdata    = tok_b.cmd.entry;
    tok_n    = tok_b;
    if (tok_b.valid) begin
      unique case (tok_b.cmd.op)
        OP_SEARCH: begin
          match = !tok_b.found && (tok_b.cmd.key <= rd_entry.ip);
          if (match) tok_n.dest = rd_entry.port;
          tok_n.found = tok_b.found | match;
        end
        OP_WRITE: begin
          we    = is_j;
          wdata = tok_b.cmd.entry;
        end
        OP_READ: begin
          if (is_j) tok_n.data = rd_entry;
        end
        OP_FORWARD: begin
          we         = in_range;
          wdata      = tok_b.data;   // col_q of the previous unit
          tok_n.data = col_q;        // handed on to the next unit
        end
        OP_BACKWARD: begin
          we    = in_range;
          wdata = next_col;
        end
        OP_WRITECOL: begin
          we    = 1'b1;
          wdata = col_q;
        end
        OP_CHANGECOL: begin
          we    = in_range && (col_q.len == tok_b.cmd.len);
          wdata = '{ip: col_q.ip, len: tok_b.cmd.newlen, port: tok_b.cmd.p};
        end
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tok_o <= '0;
      col_q <= '0;
    end else begin
      tok_o <= tok_n;
      if (tok_b.valid && tok_b.cmd.op == OP_READCOL) col_q <= rd_entry;
    end
  end

  assign col_o = col_q;

  lr_sram #(.DEPTH(COLS), .WIDTH($bits(entry_t))) u_mem (
    .clk   (clk),
    .re    (rd_en),
    .raddr (rd_addr),
    .rdata (rd_word),
    .we    (we),
    .waddr (tok_b.cmd.m[AW-1:0]),
    .wdata (wdata)
  );

endmodule
