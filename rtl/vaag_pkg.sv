// vaag_pkg: types, sizes and the coalescing rules shared by the vertex attribute
// address generator (ACAL address ALUs + CLSC coalescer).
//
// An attribute address is ADDR_W = 16 bits: the upper MSB_W = 6 bits select a
// region (the "MSB"), the lower OFF_W = 10 bits are the offset inside it. Two
// addresses with the same MSB can be fetched together; a coalesced address is
// sent as one common MSB followed by the offsets of every address merged into
// it. These three widths follow the published address layout. The size width,
// the descriptor layout and the limit on merges (MAX_COAL) are this design's
// own choices.
//
// clsc_step_addr / clsc_step_end hold the coalescing FSM as pure functions:
// given the FSM context and one event (one address, or a warp/block end) they
// return the next context and the zero, one or two records that leave the unit.
// The CLSC applies them several times per clock; a reference model can apply
// them (or its own copy of the rules) one event at a time.
package vaag_pkg;

  localparam int unsigned ADDR_W   = 16;  // attribute address width
  localparam int unsigned MSB_W    = 6;   // bits compared for coalescing
  localparam int unsigned OFF_W    = 10;  // offset bits kept per merged address
  localparam int unsigned SIZE_W   = 5;   // attribute size in bytes, 0..31
  localparam int unsigned IDX_W    = 16;  // vertex index width
  localparam int unsigned STRIDE_W = 8;   // vertex stride in bytes
  localparam int unsigned AOFF_W   = 8;   // attribute offset inside a vertex
  localparam int unsigned MAX_COAL = 2;   // largest "max coalesce number"
  localparam int unsigned SLOTS    = MAX_COAL + 2;  // addresses per record
  localparam int unsigned CNT_W    = $clog2(SLOTS + 1);
  localparam int unsigned MAXC_W   = $clog2(MAX_COAL + 1);

  // One attribute address as it leaves an ACAL ALU (fig. "Address Size Status
  // Valid"). oob is the status: the address lies outside its vertex buffer.
  typedef struct packed {
    logic              valid;
    logic [ADDR_W-1:0] addr;
    logic [SIZE_W-1:0] size;
    logic              oob;
  } attr_t;

  // Attribute descriptor used by both ALUs.
  typedef struct packed {
    logic [ADDR_W-1:0]   base;    // start of the vertex buffer
    logic [STRIDE_W-1:0] stride;  // bytes from one vertex to the next
    logic [AOFF_W-1:0]   offset;  // byte offset of the attribute in a vertex
    logic [SIZE_W-1:0]   size;    // attribute size in bytes
    logic [ADDR_W:0]     limit;   // buffer length in bytes
  } attr_desc_t;

  // One record on the CLSC output: a coalesced address (count >= 1), or a
  // flag-only record (count == 0) that carries a warp or block end alone.
  typedef struct packed {
    logic [MSB_W-1:0]              msb;
    logic [SLOTS-1:0][OFF_W-1:0]   offset;     // slot i holds the i-th address
    logic [SLOTS-1:0][SIZE_W-1:0]  size;
    logic [CNT_W-1:0]              count;      // addresses merged in
    logic                          oob;        // single out-of-bounds address
    logic                          two_lines;  // first address crosses a line
    logic                          warp_end;
    logic                          block_end;
  } clsc_out_t;

  typedef enum logic [1:0] {
    ST_IDLE = 2'd0,  // nothing cached
    ST_NCOL = 2'd1,  // one address cached, not yet merged (Non-COAL)
    ST_COAL = 2'd2   // cached address has absorbed at least one other
  } clsc_state_e;

  typedef struct packed {
    clsc_state_e       state;
    clsc_out_t         cache;   // the address waiting for partners
    logic [MAXC_W-1:0] merges;  // merges done while in COAL
  } clsc_ctx_t;

  typedef struct packed {
    clsc_ctx_t  ctx;
    logic [1:0] n_out;  // 0, 1 or 2 records leave
    clsc_out_t  out0;   // leaves first
    clsc_out_t  out1;
  } clsc_step_t;

  // An address needs a second line when its last byte lies past the offset
  // range of its MSB region.
  function automatic logic needs_two_lines(logic [OFF_W-1:0] off,
                                          logic [SIZE_W-1:0] size);
    logic [OFF_W:0] last_end;
    last_end = {1'b0, off} + (OFF_W+1)'(size);
    return last_end > (OFF_W+1)'(1 << OFF_W);
  endfunction

  function automatic clsc_out_t single_rec(attr_t a);
    clsc_out_t r;
    r           = '0;
    r.msb       = a.addr[ADDR_W-1 -: MSB_W];
    r.offset[0] = a.addr[OFF_W-1:0];
    r.size[0]   = a.size;
    r.count     = CNT_W'(a.valid);  // called for valid addresses: 1
    r.oob       = a.oob;
    r.two_lines = needs_two_lines(a.addr[OFF_W-1:0], a.size);
    return r;
  endfunction

  function automatic clsc_out_t merge_rec(clsc_out_t e, logic [OFF_W-1:0] off,
                                          logic [SIZE_W-1:0] size);
    clsc_out_t r;
    r                  = e;
    r.offset[e.count]  = off;
    r.size[e.count]    = size;
    r.count            = e.count + CNT_W'(1);
    return r;
  endfunction

  // One valid address through the FSM (transition numbers as in the state
  // diagram: 1..8).
  function automatic clsc_step_t clsc_step_addr(clsc_ctx_t c, attr_t a,
                                                logic [MAXC_W-1:0] max_coal);
    clsc_step_t r;
    clsc_out_t  n;
    logic       match;
    n      = single_rec(a);
    match  = (c.cache.msb == n.msb);
    r      = '0;
    r.ctx  = c;
    unique case (c.state)
      ST_IDLE: begin
        if (a.oob) begin                         // 3: pass it on alone
          r.out0 = n; r.n_out = 2'd1;
        end else begin                           // 4: cache it
          r.ctx.state = ST_NCOL; r.ctx.cache = n; r.ctx.merges = '0;
        end
      end
      ST_NCOL: begin
        if (a.oob) begin                         // 8.1: flush both
          r.out0 = c.cache; r.out1 = n; r.n_out = 2'd2;
          r.ctx  = '0;
        end else if (n.two_lines || !match) begin // 5: flush cache, keep new
          r.out0 = c.cache; r.n_out = 2'd1;
          r.ctx.cache = n; r.ctx.merges = '0;
        end else begin                           // 6: first merge
          r.ctx.state = ST_COAL; r.ctx.cache = merge_rec(c.cache, n.offset[0], n.size[0]);
          r.ctx.merges = '0;
        end
      end
      ST_COAL: begin
        if (a.oob) begin                         // 2.2: flush both
          r.out0 = c.cache; r.out1 = n; r.n_out = 2'd2;
          r.ctx  = '0;
        end else if (n.two_lines || !match || max_coal == '0) begin // 7
          r.out0 = c.cache; r.n_out = 2'd1;
          r.ctx.state = ST_NCOL; r.ctx.cache = n; r.ctx.merges = '0;
        end else if (c.merges + MAXC_W'(1) < max_coal) begin // 1: keep merging
          r.ctx.cache  = merge_rec(c.cache, n.offset[0], n.size[0]);
          r.ctx.merges = c.merges + MAXC_W'(1);
        end else begin                           // 2.1: limit reached
          r.out0 = merge_rec(c.cache, n.offset[0], n.size[0]); r.n_out = 2'd1;
          r.ctx  = '0;
        end
      end
      default: r.ctx = '0;
    endcase
    return r;
  endfunction

  // A warp or block end: flush whatever is cached, flags attached.
  function automatic clsc_step_t clsc_step_end(clsc_state_e state,
                                               clsc_out_t cache, logic warp_end,
                                               logic block_end);
    clsc_step_t r;
    r = '0;
    r.out0 = (state == ST_IDLE) ? clsc_out_t'('0) : cache;
    r.out0.warp_end  = warp_end;
    r.out0.block_end = block_end;
    r.n_out = 2'd1;
    r.ctx   = '0;                                // 8.2 (and COAL, IDLE alike)
    return r;
  endfunction

endpackage
