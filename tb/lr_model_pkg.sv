// Reference model of the route lookup engine for the testbenches.
//
// It applies every search and command in issue order to a plain copy of the
// range-table matrix (mem[unit][column]), the column registers and the range
// search bounds, and returns the result the hardware must produce. It knows
// nothing of the pipeline timing: the hardware must behave as if each token
// were executed completely before the next one.
package lr_model_pkg;
  import lr_pkg::*;

  class lr_model;
    int unsigned cols, units, npipe;
    int unsigned pipe_of [];    // pipeline of each unit (index 0 = unit 1)
    entry_t      mem     [][];  // [unit][column]
    entry_t      colq    [];    // column register of each unit
    addr_t       bound   [][];  // [pipeline][column]

    function new(int unsigned cols_, int unsigned units_, int unsigned npipe_);
      cols  = cols_;
      units = units_;
      npipe = npipe_;
      pipe_of = new[units];
      mem     = new[units];
      colq    = new[units];
      for (int u = 0; u < int'(units); u++) begin
        pipe_of[u] = 0;
        mem[u]     = new[cols];
        colq[u]    = '0;
        foreach (mem[u][c]) mem[u][c] = '0;
      end
      bound = new[npipe];
      foreach (bound[p]) begin
        bound[p] = new[cols];
        foreach (bound[p][c]) bound[p][c] = '1;
      end
    endfunction

    // first column whose bound is >= key; the last column takes the rest
    function int unsigned range_col(int unsigned p, addr_t key);
      for (int unsigned c = 0; c + 1 < cols; c++)
        if (bound[p][c] >= key) return c;
      return cols - 1;
    endfunction

    function int unsigned units_in(int unsigned p);
      int unsigned n = 0;
      for (int unsigned u = 0; u < units; u++) if (pipe_of[u] == p) n++;
      return n;
    endfunction

    // Execute one token on pipeline p. idx is the column of a search.
    function result_t apply(int unsigned p, cmd_t c, int unsigned idx);
      result_t r;
      entry_t  prev, nxt;
      int unsigned m, ju, ix;
      m       = int'(c.m) % cols;
      ju      = (c.j >= 1) ? int'(c.j) - 1 : 0;
      ix      = idx % cols;
      r       = '0;
      r.valid = 1'b1;
      r.op    = c.op;
      r.tag   = c.tag;
      r.index = IDX_W'(idx);
      case (c.op)
        OP_SEARCH: begin
          for (int unsigned u = 0; u < units; u++) begin
            if (pipe_of[u] == p && !r.found && c.key <= mem[u][ix].ip) begin
              r.found = 1'b1;
              r.dest  = mem[u][ix].port;
            end
          end
        end
        OP_WRITE: begin
          if (c.j >= 1 && int'(c.j) <= units && pipe_of[ju] == p) mem[ju][m] = c.entry;
        end
        OP_READ: begin
          if (c.j >= 1 && int'(c.j) <= units && pipe_of[ju] == p) r.data = mem[ju][m];
        end
        OP_NEWRANGE: bound[p][m] = c.entry.ip;
        OP_READCOL: begin
          for (int unsigned u = 0; u < units; u++) if (pipe_of[u] == p) colq[u] = mem[u][m];
        end
        OP_FORWARD: begin
          prev = '0;
          for (int unsigned u = 0; u < units; u++) begin
            if (pipe_of[u] == p) begin
              if (u + 1 >= c.j && u + 1 <= c.k) mem[u][m] = prev;
              prev = colq[u];
            end
          end
        end
        OP_BACKWARD: begin
          nxt = '0;
          for (int u = int'(units) - 1; u >= 0; u--) begin
            if (pipe_of[u] == p) begin
              if (u + 1 >= int'(c.j) && u + 1 <= int'(c.k)) mem[u][m] = nxt;
              nxt = colq[u];
            end
          end
        end
        OP_WRITECOL: begin
          for (int unsigned u = 0; u < units; u++) if (pipe_of[u] == p) mem[u][m] = colq[u];
        end
        OP_CHANGECOL: begin
          for (int unsigned u = 0; u < units; u++) begin
            if (pipe_of[u] == p && u + 1 >= c.j && u + 1 <= c.k && colq[u].len == c.len)
              mem[u][m] = '{ip: colq[u].ip, len: c.newlen, port: c.p};
          end
        end
        default: ;
      endcase
      return r;
    endfunction

    // Compare a hardware result with the expected one; returns 1 on a match.
    static function bit same(result_t got, result_t exp, bit check_index);
      if (got.op != exp.op || got.tag != exp.tag) return 0;
      if (exp.op == OP_SEARCH) begin
        if (got.found != exp.found) return 0;
        if (exp.found && got.dest != exp.dest) return 0;
        if (check_index && got.index != exp.index) return 0;
      end
      if (exp.op == OP_READ && got.data != exp.data) return 0;
      return 1;
    endfunction
  endclass

  // A random command of the given kind with fields in range.
  function automatic cmd_t rand_cmd(op_e op, int unsigned cols, int unsigned units);
    cmd_t c;
    c          = '0;
    c.op       = op;
    c.tag      = TAG_W'($urandom);
    c.key      = $urandom;
    c.m        = IDX_W'($urandom_range(cols - 1, 0));
    c.j        = NUM_W'($urandom_range(units, 1));
    c.k        = NUM_W'($urandom_range(units, 1));
    c.len      = LEN_W'($urandom_range(3, 0));
    c.newlen   = LEN_W'($urandom_range(32, 0));
    c.p        = PORT_W'($urandom);
    c.entry.ip   = $urandom;
    c.entry.len  = LEN_W'($urandom_range(3, 0));
    c.entry.port = PORT_W'($urandom);
    return c;
  endfunction

endpackage
