// clsc_ref_pkg: reference model of the coalescing rules for testbenches.
//
// clsc_ref handles one event at a time, the way a sequential software model
// does: an address, or a warp/block end. It keeps the FSM state, the cached
// record and the merges done in COAL, appends every record that must leave
// the unit to `expq`, and counts how often each transition (numbered as in
// the state diagram, with sub-cases) happened in `hit`.
package clsc_ref_pkg;
  import vaag_pkg::*;

  localparam int IDLE = 0, NCOL = 1, COAL = 2;

  class clsc_ref;
    int        state  = IDLE;
    clsc_out_t cache  = '0;
    int        merges = 0;
    clsc_out_t expq[$];
    int        hit[string];

    function void note(string t);
      if (hit.exists(t)) hit[t]++; else hit[t] = 1;
    endfunction

    static function clsc_out_t mk(attr_t a);
      clsc_out_t r = '0;
      r.msb       = a.addr[15:10];
      r.offset[0] = a.addr[9:0];
      r.size[0]   = a.size;
      r.count     = 1;
      r.oob       = a.oob;
      r.two_lines = (int'(a.addr[9:0]) + int'(a.size)) > 1024;
      return r;
    endfunction

    function void add(attr_t a);
      int k;
      k = int'(cache.count);
      cache.offset[k] = a.addr[9:0];
      cache.size[k]   = a.size;
      cache.count     = cache.count + 1;
    endfunction

    function void flush_to(int st);
      cache = '0; state = st; merges = 0;
    endfunction

    function void addr(attr_t a, int maxc);
      clsc_out_t n;
      bit match;
      if (!a.valid) return;
      n = mk(a);
      match = (cache.msb == a.addr[15:10]);
      case (state)
        IDLE:
          if (a.oob) begin expq.push_back(n); note("3"); end
          else begin cache = n; state = NCOL; merges = 0; note("4"); end
        NCOL:
          if (a.oob) begin
            expq.push_back(cache); expq.push_back(n); flush_to(IDLE); note("8.1");
          end else if (n.two_lines || !match) begin
            expq.push_back(cache); cache = n; note(n.two_lines ? "5.1" : "5.2");
          end else begin
            add(a); state = COAL; merges = 0; note("6");
          end
        default:
          if (a.oob) begin
            expq.push_back(cache); expq.push_back(n); flush_to(IDLE); note("2.2");
          end else if (n.two_lines || !match || maxc == 0) begin
            expq.push_back(cache); cache = n; state = NCOL; merges = 0;
            note(n.two_lines ? "7.1" : (!match ? "7.3" : "7.2"));
          end else if (merges + 1 < maxc) begin
            add(a); merges++; note("1");
          end else begin
            add(a); expq.push_back(cache); flush_to(IDLE); note("2.1");
          end
      endcase
    endfunction

    function void flags(logic we, logic be);
      clsc_out_t r;
      if (!(we || be)) return;
      r = (state == IDLE) ? clsc_out_t'('0) : cache;
      r.warp_end = we; r.block_end = be;
      expq.push_back(r);
      note(state == IDLE ? "end_idle" : (state == NCOL ? "8.2" : "end_coal"));
      flush_to(IDLE);
    endfunction
  endclass

endpackage
