// cache_ref_pkg: transaction-level reference model of the blocking caches,
// used by the testbenches to predict each response independently of the RTL.
//
// cache_ref models a write-back, write-allocate cache of 16 lines of four
// words, organised as `ways` ways of 16/ways sets, over a sparse word memory
// that reads as zero where nothing was written. For every request it returns
// the expected read data and test field (1 hit, 0 miss or init) and reports
// whether the request refilled a line and whether it first wrote back a dirty
// victim. Replacement: the hitting way, else the first invalid way, else the
// set's least-recently-used way; the LRU bit points away from the way used by
// the last init, read or write. Init writes one word into the chosen line,
// marks it valid and clean and leaves memory alone.
package cache_ref_pkg;

  typedef struct {
    bit          hit;
    bit          refill;
    bit          evict;
    bit [31:0]   rdata;
  } ref_result_t;

  class cache_ref;
    int unsigned ways;
    int unsigned sets;
    bit          valid [16];
    bit          dirty [16];
    bit [31:0]   tag   [16];
    bit [31:0]   line  [16][4];
    bit          lru   [16];
    bit [31:0]   mem   [bit [31:0]];

    function new(int unsigned ways);
      this.ways = ways;
      this.sets = 16 / ways;
      for (int i = 0; i < 16; i++) begin
        valid[i] = 0; dirty[i] = 0; lru[i] = 0; tag[i] = 0;
        for (int w = 0; w < 4; w++) line[i][w] = 0;
      end
    endfunction

    function bit [31:0] mem_rd(bit [31:0] a);
      bit [31:0] k;
      k = a >> 2;
      if (mem.exists(k)) return mem[k];
      return 0;
    endfunction

    function void mem_wr(bit [31:0] a, bit [31:0] d);
      mem[a >> 2] = d;
    endfunction

    // kind: 0 read, 1 write, 2 init
    function ref_result_t access(int kind, bit [31:0] addr, bit [31:0] wdata);
      ref_result_t r;
      int unsigned set, ltag, woff, way, li;
      bit found;
      set  = (addr >> 4) % sets;
      ltag = (addr >> 4) / sets;
      woff = (addr >> 2) % 4;
      r = '{hit: 0, refill: 0, evict: 0, rdata: 0};
      found = 0;
      way = 0;
      for (int w = 0; w < int'(ways); w++) begin
        if (!found && valid[w*sets + set] && tag[w*sets + set] == ltag) begin
          found = 1; way = w;
        end
      end
      if (!found) begin
        bit inv;
        inv = 0;
        for (int w = 0; w < int'(ways); w++)
          if (!inv && !valid[w*sets + set]) begin inv = 1; way = w; end
        if (!inv) way = (ways == 1) ? 0 : int'(lru[set]);
      end
      li = way*sets + set;
      if (kind == 2) begin
        tag[li] = ltag; valid[li] = 1; dirty[li] = 0;
        line[li][woff] = wdata;
      end else begin
        if (!found) begin
          if (valid[li] && dirty[li]) begin
            r.evict = 1;
            for (int w = 0; w < 4; w++) mem_wr(((tag[li]*sets + set) << 4) + w*4, line[li][w]);
          end
          r.refill = 1;
          for (int w = 0; w < 4; w++) line[li][w] = mem_rd(((ltag*sets + set) << 4) + w*4);
          tag[li] = ltag; valid[li] = 1; dirty[li] = 0;
        end
        r.hit = found;
        if (kind == 0) r.rdata = line[li][woff];
        else begin line[li][woff] = wdata; dirty[li] = 1; end
      end
      if (ways == 2) lru[set] = (way == 0);
      return r;
    endfunction
  endclass

endpackage
