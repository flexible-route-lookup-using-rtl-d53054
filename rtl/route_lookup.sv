// Route lookup engine: longest prefix match by range search, for NPIPE
// routing tables searched at the same time.
//
// Each routing table is kept as a sorted range table (every entry: last
// address of a range, prefix length, port). The table is spread over a
// matrix of COLS columns by the rows of the search units a pipeline owns;
// each column is sorted from its first row down and the bound of every
// column is kept in that pipeline's range search unit. A search first finds
// the column by binary search over the bounds, then walks down the column in
// the pipeline's search units; the first entry whose address is >= the
// search address gives the port. All search units form one pool that
// unit_pipe partitions between the pipelines.
//
// Per pipeline p:
//   cmd_valid[p]/cmd_ready[p]/cmd[p]  one search or command per cycle; ready
//       is low only while a BACKWARD waits for its READCOL (cmd_issue).
//   res[p]  the token leaving the pipeline: for a search, found and dest; for
//       READ, data; every token (commands too) comes out, with its tag and op.
//   stall[p]  the entry gate is holding a BACKWARD this cycle.
// Latency from an accepted input to res: 2*log2(COLS) cycles of range search
// plus 2 cycles per search unit the pipeline owns.
//
// The split into range search and identical search units, the commands and
// the muxed pool follow the document; the entry gate, the handshake, the
// tags and the pipeline register placement are this design's own.
module route_lookup
  import lr_pkg::*;
#(
  parameter int unsigned COLS  = 8192,  // memory positions per search unit (M)
  parameter int unsigned UNITS = 61,    // search units (R)
  parameter int unsigned NPIPE = 2,     // search pipelines / routing tables
  localparam int unsigned PW = (NPIPE > 1) ? $clog2(NPIPE) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [PW-1:0] unit_pipe [UNITS],
  input  logic          cmd_valid [NPIPE],
  output logic          cmd_ready [NPIPE],
  input  cmd_t          cmd       [NPIPE],
  output result_t       res       [NPIPE],
  output logic          stall     [NPIPE]
);

  tok_t rs_tok [NPIPE];
  tok_t end_tok [NPIPE];

  for (genvar p = 0; p < NPIPE; p++) begin : g_pipe
    logic iss_valid;
    cmd_t iss_cmd;

    cmd_issue u_issue (
      .clk     (clk),
      .rst_n   (rst_n),
      .valid_i (cmd_valid[p]),
      .ready_o (cmd_ready[p]),
      .cmd_i   (cmd[p]),
      .valid_o (iss_valid),
      .cmd_o   (iss_cmd),
      .stall_o (stall[p])
    );

    range_search #(.COLS(COLS)) u_rs (
      .clk     (clk),
      .rst_n   (rst_n),
      .valid_i (iss_valid),
      .cmd_i   (iss_cmd),
      .tok_o   (rs_tok[p])
    );

    always_comb begin
      res[p].valid = end_tok[p].valid;
      res[p].op    = end_tok[p].cmd.op;
      res[p].tag   = end_tok[p].cmd.tag;
      res[p].found = end_tok[p].found;
      res[p].dest  = end_tok[p].dest;
      res[p].index = end_tok[p].index;
      res[p].data  = end_tok[p].data;
    end
  end

  search_array #(.COLS(COLS), .UNITS(UNITS), .NPIPE(NPIPE)) u_array (
    .clk       (clk),
    .rst_n     (rst_n),
    .unit_pipe (unit_pipe),
    .tok_i     (rs_tok),
    .tok_o     (end_tok)
  );

endmodule
