// tb_cache_alt: self-checking testbench of cache_alt (two-way set-associative cache).
//
// A test source issues word requests one at a time, a test sink takes the
// responses, and test_mem stands for main memory. Every response is compared
// with cache_ref (an independent transaction-level model): type, opaque,
// data of reads, and the test field (1 hit, 0 miss). With no source, sink or
// memory delay the cycle count from acceptance to response is checked too:
// 3 cycles after the accepting edge for a hit or an init (states I, TC,
// RD/WD/IN, W), 6 for a clean miss (adds RR, RW, RU) and 9 for a dirty miss
// (adds EP, ER, EW). Phases: directed tests (init then read hit; refill,
// hits on the refilled line, write miss to a conflicting line, eviction of a
// dirty line; two conflicting lines sharing a set and LRU eviction by a third), then random reads, writes and inits over a small
// address range with random source/sink delays, memory latency and memory
// stalls. Counts of hits, clean misses, dirty misses, inits, memory stalls
// and sink back-pressure must each be non-zero. A watchdog ends the run.
module tb_cache_alt;
  import cache_msgs_pkg::*;
  import cache_ref_pkg::*;

  logic clk = 1'b0;
  logic reset = 1'b1;
  always #5 clk = ~clk;

  logic          cachereq_val, cachereq_rdy;
  mem_req_4B_t   cachereq_msg;
  logic          cacheresp_val, cacheresp_rdy;
  mem_resp_4B_t  cacheresp_msg;
  logic          memreq_val, memreq_rdy;
  mem_req_16B_t  memreq_msg;
  logic          memresp_val, memresp_rdy;
  mem_resp_16B_t memresp_msg;
  cache_state_e  state;

  int unsigned mem_latency = 0;
  int unsigned mem_stall   = 0;

  cache_alt dut (.*);

  test_mem u_mem (
    .clk, .reset, .latency(mem_latency), .stall_pct(mem_stall),
    .memreq_val, .memreq_rdy, .memreq_msg,
    .memresp_val, .memresp_rdy, .memresp_msg
  );

  int checks = 0, failures = 0;
  int unsigned cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // Watchdog
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_hit = 0, n_clean_miss = 0, n_dirty_miss = 0, n_init = 0;
  int n_mem_stall = 0, n_sink_stall = 0, n_evict_wr = 0;
  always @(negedge clk) begin
    if (!reset && memreq_val && !memreq_rdy) n_mem_stall++;
    if (!reset && cacheresp_val && !cacheresp_rdy) n_sink_stall++;
    if (!reset && memreq_val && memreq_rdy && memreq_msg.msg_type == MEM_WRITE) n_evict_wr++;
  end

  cache_ref rm;
  int unsigned src_delay = 0, sink_delay = 0;
  logic [7:0]  opq = 8'd0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  task automatic xact(input mem_type_e t, input logic [31:0] addr, input logic [31:0] data,
                      input bit check_time = 1'b1);
    ref_result_t exp;
    int unsigned acc_cyc, resp_cyc, exp_lat;
    mem_resp_4B_t got;
    exp = rm.access(int'(t), addr, data);
    repeat ($urandom_range(src_delay, 0)) @(negedge clk);
    cachereq_val = 1'b1;
    cachereq_msg = '{msg_type: t, opaque: opq, addr: addr, len: 2'd0, data: data};
    while (!cachereq_rdy) @(negedge clk);
    acc_cyc = cycle;
    @(negedge clk);
    cachereq_val = 1'b0;
    cachereq_msg = '0;
    forever begin
      cacheresp_rdy = ($urandom_range(sink_delay, 0) == 0);
      if (cacheresp_val && cacheresp_rdy) break;
      @(negedge clk);
    end
    resp_cyc = cycle;
    got = cacheresp_msg;
    @(negedge clk);
    cacheresp_rdy = 1'b0;

    if (t == MEM_INIT) n_init++;
    else if (exp.hit) n_hit++;
    else if (exp.evict) n_dirty_miss++;
    else n_clean_miss++;

    check(got.msg_type == t, $sformatf("type %0d exp %0d", got.msg_type, t));
    check(got.opaque == opq, $sformatf("opaque %h exp %h", got.opaque, opq));
    check(got.test == {1'b0, exp.hit}, $sformatf("%s %h: test %0d exp %0d",
          t.name(), addr, got.test, exp.hit));
    if (t == MEM_READ)
      check(got.data == exp.rdata, $sformatf("read %h: data %h exp %h", addr, got.data, exp.rdata));
    if (check_time && src_delay == 0 && sink_delay == 0 && mem_latency == 0 && mem_stall == 0) begin
      exp_lat = 3 + (exp.refill ? 3 : 0) + (exp.evict ? 3 : 0);
      check(resp_cyc - acc_cyc == exp_lat, $sformatf("%s %h: latency %0d exp %0d",
            t.name(), addr, resp_cyc - acc_cyc, exp_lat));
    end
    opq = opq + 8'd1;
  endtask

  task automatic preload(input logic [31:0] addr, input logic [31:0] data);
    u_mem.write_word(addr, data);
    rm.mem_wr(addr, data);
  endtask

  initial begin
    rm = new(2);
    cachereq_val = 1'b0;
    cachereq_msg = '0;
    cacheresp_rdy = 1'b0;
    repeat (3) @(negedge clk);
    reset = 1'b0;
    @(negedge clk);

    // Init then read hit of the same word
    xact(MEM_INIT, 32'h0000_1000, 32'hdeadbeef);
    xact(MEM_READ, 32'h0000_1000, 32'h0);
    check(state == ST_I, "idle after read hit");

    // Refill, hits on the refilled line, conflicting write miss, dirty eviction
    preload(32'h0000_0000, 32'h0e5ca18d);
    preload(32'h0000_0004, 32'h00ba11ad);
    xact(MEM_READ,  32'h0000_0000, 32'h0);
    xact(MEM_READ,  32'h0000_0000, 32'h0);
    xact(MEM_READ,  32'h0000_0004, 32'h0);
    xact(MEM_WRITE, 32'h0000_0100, 32'h00e1de57);
    xact(MEM_READ,  32'h0000_0100, 32'h0);
    xact(MEM_WRITE, 32'h0000_0108, 32'h1234_5678);
    xact(MEM_READ,  32'h0000_0000, 32'h0);
    xact(MEM_READ,  32'h0000_0200, 32'h0);
    xact(MEM_READ,  32'h0000_0108, 32'h0);
    xact(MEM_READ,  32'h0000_0100, 32'h0);

    // Two-way set: 0x000 and 0x100 share set 0 and both stay resident; a
    // third line (0x200) evicts the least recently used one.
    xact(MEM_READ,  32'h0000_0000, 32'h0);
    xact(MEM_READ,  32'h0000_0100, 32'h0);
    xact(MEM_READ,  32'h0000_0000, 32'h0);
    xact(MEM_READ,  32'h0000_0200, 32'h0);
    xact(MEM_READ,  32'h0000_0000, 32'h0);
    xact(MEM_READ,  32'h0000_0100, 32'h0);
    check(u_mem.read_word(32'h0000_0108) == 32'h1234_5678, "dirty line written back to memory");

    // Random phases: (src delay, sink delay, memory latency, memory stall %)
    for (int phase = 0; phase < 5; phase++) begin
      case (phase)
        0: begin src_delay = 0; sink_delay = 0; mem_latency = 0;  mem_stall = 0;  end
        1: begin src_delay = 3; sink_delay = 0; mem_latency = 2;  mem_stall = 0;  end
        2: begin src_delay = 0; sink_delay = 3; mem_latency = 0;  mem_stall = 40; end
        3: begin src_delay = 2; sink_delay = 2; mem_latency = 20; mem_stall = 20; end
        default: begin src_delay = 0; sink_delay = 0; mem_latency = 0; mem_stall = 0; end
      endcase
      for (int i = 0; i < 400; i++) begin
        int unsigned r;
        logic [31:0] a;
        r = $urandom_range(99, 0);
        a = 32'(($urandom_range(39, 0) << 4) | ($urandom_range(3, 0) << 2));
        if (r < 3)       xact(MEM_INIT,  a, $urandom);
        else if (r < 50) xact(MEM_WRITE, a, $urandom);
        else             xact(MEM_READ,  a, 32'h0);
      end
    end

    check(n_hit > 0,        "hit path exercised");
    check(n_clean_miss > 0, "clean miss path exercised");
    check(n_dirty_miss > 0, "dirty miss path exercised");
    check(n_init > 0,       "init path exercised");
    check(n_mem_stall > 0,  "memory back-pressure exercised");
    check(n_sink_stall > 0, "sink back-pressure exercised");
    check(n_evict_wr == n_dirty_miss, $sformatf("write-backs %0d exp %0d", n_evict_wr, n_dirty_miss));
    $display("hits=%0d clean_misses=%0d dirty_misses=%0d inits=%0d mem_stalls=%0d sink_stalls=%0d",
             n_hit, n_clean_miss, n_dirty_miss, n_init, n_mem_stall, n_sink_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
