// The shared pool of search units and the muxes that partition it between
// search pipelines.
//
// UNITS search units sit in a fixed physical order, numbered 1..UNITS. Each
// unit belongs to one of NPIPE pipelines, chosen by unit_pipe[i]. Every
// pipeline has a bus that runs past all units: at unit i, the bus of the
// unit's own pipeline feeds the unit and is then replaced by the unit's
// output register, while the buses of the other pipelines go past unchanged.
// So each pipeline sees only its own units, in physical order, and runs its
// linear search over them. The document shows this with two range search
// units and a mux per search unit and says it generalises to more pipelines;
// the bus-per-pipeline form with unregistered bypass is this design's choice,
// so a pipeline's latency is 2 cycles per unit it owns.
//
// The next-unit feedback for BACKWARD is routed the same way, backwards:
// each unit receives col_q of the next unit of its own pipeline (zero after
// the last one).
//
// unit_pipe is configuration: change it only while no token is in flight.
//
// Lint note: the col output of unit 0 is unused (no unit precedes it that
// could take it as BACKWARD feedback); it is kept so every unit is the same.
module search_array
  import lr_pkg::*;
#(
  parameter int unsigned COLS  = 8192,  // memory positions per unit (M)
  parameter int unsigned UNITS = 61,    // search units (R)
  parameter int unsigned NPIPE = 2,     // search pipelines
  localparam int unsigned PW = (NPIPE > 1) ? $clog2(NPIPE) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [PW-1:0] unit_pipe [UNITS],   // pipeline of each unit
  input  tok_t          tok_i [NPIPE],       // from the range search units
  output tok_t          tok_o [NPIPE]        // end of each pipeline
);

  // Per unit i: bin[p] is pipeline p's bus in front of the unit, bout[p]
  // behind it, fbk[p] the col_q of the first later unit owned by pipeline p.
  for (genvar i = 0; i < UNITS; i++) begin : g_unit
    tok_t   bin  [NPIPE];
    tok_t   bout [NPIPE];
    entry_t fbk  [NPIPE];
    tok_t   uout;
    entry_t col;

    for (genvar p = 0; p < NPIPE; p++) begin : g_pipe
      if (i == 0) begin : g_first
        assign bin[p] = tok_i[p];
      end else begin : g_next
        assign bin[p] = g_unit[i-1].bout[p];
      end
      assign bout[p] = (unit_pipe[i] == PW'(p)) ? uout : bin[p];
      if (i == UNITS - 1) begin : g_last
        assign fbk[p] = '0;
      end else begin : g_fb
        assign fbk[p] = (unit_pipe[i+1] == PW'(p)) ? g_unit[i+1].col : g_unit[i+1].fbk[p];
      end
    end

    search_unit #(.COLS(COLS), .UNIT_NUM(i + 1)) u_su (
      .clk      (clk),
      .rst_n    (rst_n),
      .tok_i    (bin[unit_pipe[i]]),
      .tok_o    (uout),
      .col_o    (col),
      .next_col (fbk[unit_pipe[i]])
    );
  end

  for (genvar p = 0; p < NPIPE; p++) begin : g_out
    assign tok_o[p] = g_unit[UNITS-1].bout[p];
  end

endmodule
