// Entry gate of one search pipeline.
//
// Searches and commands enter a pipeline one per cycle through a valid/ready
// handshake. The gate passes them straight on, except that it holds a
// BACKWARD back until three cycles after the last READCOL it let through:
// BACKWARD copies the next unit's column register, which that unit loads
// two cycles later than the current one (see search_unit). The document
// issues READCOL and BACKWARD back to back and does not say how this timing
// is met; the two-cycle stall is this design's choice. While it stalls the
// gate sends nothing down the pipeline and ready_o is low.
module cmd_issue
  import lr_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic valid_i,
  output logic ready_o,
  input  cmd_t cmd_i,
  output logic valid_o,
  output cmd_t cmd_o,
  output logic stall_o     // a BACKWARD is being held this cycle
);

  // cycles since the last READCOL went through, saturating at 3
  logic [1:0] since_rc;

  always_comb begin
    stall_o = valid_i && (cmd_i.op == OP_BACKWARD) && (since_rc != 2'd3);
    ready_o = !stall_o;
    valid_o = valid_i && !stall_o;
    cmd_o   = cmd_i;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                                  since_rc <= 2'd3;
    else if (valid_o && cmd_i.op == OP_READCOL)  since_rc <= 2'd1;
    else if (since_rc != 2'd3)                   since_rc <= since_rc + 2'd1;
  end

endmodule
