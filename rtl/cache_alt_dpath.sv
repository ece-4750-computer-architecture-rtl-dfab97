// cache_alt_dpath: datapath of the two-way set-associative blocking cache.
//
// Same structure as the direct-mapped datapath, doubled per way: 256 bytes
// are 8 sets of two 16-byte lines, so tag = addr[31:7] (25 bits),
// idx = addr[6:4] (3 bits) and word offset = addr[3:2]. Each way has its own
// tag array (8 x 25 bit) and data array (8 x 128 bit), both comb_sram read at
// idx, and its own tag comparator; tag_match[w] goes to the control unit,
// which ANDs it with the way's valid bit. ctrl.way (chosen by the control
// unit in tag check) selects the way that is written, evicted or read:
//   * write enables reach only the selected way's arrays;
//   * the victim address {stored tag of that way, idx, 4'b0000} and line are
//     captured in evict-prepare;
//   * the read word is taken from that way's line.
// rep1, mkaddr, the refill register and the request registers are as in the
// direct-mapped datapath. The per-way split of arrays and comparators follows
// the published description; the register set is this design's choice.
module cache_alt_dpath
  import cache_msgs_pkg::*;
(
  input  logic          clk,

  input  mem_req_4B_t   cachereq_msg,
  output mem_resp_4B_t  cacheresp_msg,
  output mem_req_16B_t  memreq_msg,
  input  mem_resp_16B_t memresp_msg,

  input  cache_ctrl_t   ctrl,
  output mem_type_e     req_type,    // type of the held request
  output logic [2:0]    req_idx,     // set index of the held request
  output logic [1:0]    tag_match    // per way: stored tag equals request tag
);

  localparam int unsigned NUM_WAYS = 2;
  localparam int unsigned NUM_SETS = NUM_LINES / NUM_WAYS;            // 8
  localparam int unsigned IDX_BITS = 3;
  localparam int unsigned TAG_BITS = 32 - IDX_BITS - OFFSET_BITS;     // 25

  // Request registers
  mem_type_e   type_reg;
  logic [7:0]  opaque_reg;
  logic [31:0] addr_reg;
  logic [31:0] data_reg;

  always_ff @(posedge clk) begin
    if (ctrl.cachereq_en) begin
      type_reg   <= cachereq_msg.msg_type;
      opaque_reg <= cachereq_msg.opaque;
      addr_reg   <= cachereq_msg.addr;
      data_reg   <= cachereq_msg.data;
    end
  end

  logic [TAG_BITS-1:0] req_tag;
  logic [IDX_BITS-1:0] idx;
  logic [1:0]          woff;
  assign req_tag = addr_reg[31 -: TAG_BITS];
  assign idx     = addr_reg[OFFSET_BITS +: IDX_BITS];
  assign woff    = addr_reg[3:2];

  // Data-array write source (shared by both ways)
  logic [127:0] rep1_data;      // rep1: request word replicated four times
  assign rep1_data = {4{data_reg}};

  logic [127:0] refill_reg;
  logic [127:0] data_wdata;
  logic [3:0]   data_wben;
  always_comb begin
    if (ctrl.wdata_sel == WDATA_REFILL) begin
      data_wdata = refill_reg;
      data_wben  = 4'b1111;
    end else begin
      data_wdata = rep1_data;
      data_wben  = 4'b0001 << woff;
    end
  end

  // Per-way arrays
  logic [TAG_BITS-1:0] tag_rdata  [NUM_WAYS];
  logic [127:0]        data_rdata [NUM_WAYS];

  for (genvar w = 0; w < NUM_WAYS; w++) begin : g_way
    logic way_sel;
    assign way_sel = (ctrl.way == w[0]);

    comb_sram #(.WIDTH(TAG_BITS), .DEPTH(NUM_SETS), .SLICE(TAG_BITS)) tag_array (
      .clk   (clk),
      .raddr (idx),
      .rdata (tag_rdata[w]),
      .wen   (ctrl.tag_wen && way_sel),
      .waddr (idx),
      .wben  (1'b1),
      .wdata (req_tag)
    );

    comb_sram #(.WIDTH(128), .DEPTH(NUM_SETS), .SLICE(32)) data_array (
      .clk   (clk),
      .raddr (idx),
      .rdata (data_rdata[w]),
      .wen   (ctrl.data_wen && way_sel),
      .waddr (idx),
      .wben  (data_wben),
      .wdata (data_wdata)
    );

    assign tag_match[w] = (tag_rdata[w] == req_tag);
  end

  // Selected way
  logic [TAG_BITS-1:0] sel_tag;
  logic [127:0]        sel_line;
  assign sel_tag  = tag_rdata[ctrl.way];
  assign sel_line = data_rdata[ctrl.way];

  // mkaddr: line addresses for refill (request tag) and eviction (stored tag)
  logic [31:0] refill_addr;
  assign refill_addr = {req_tag, idx, 4'b0000};

  logic [31:0]  evict_addr_reg;
  logic [127:0] evict_data_reg;
  always_ff @(posedge clk) begin
    if (ctrl.evict_en) begin
      evict_addr_reg <= {sel_tag, idx, 4'b0000};
      evict_data_reg <= sel_line;
    end
  end

  always_ff @(posedge clk) begin
    if (ctrl.refill_en) refill_reg <= memresp_msg.data;
  end

  logic [31:0] read_data_reg;
  always_ff @(posedge clk) begin
    if (ctrl.read_data_en) read_data_reg <= sel_line[woff*32 +: 32];
  end

  // Outgoing messages
  always_comb begin
    memreq_msg.msg_type = ctrl.memreq_type;
    memreq_msg.opaque   = 8'd0;
    memreq_msg.addr     = (ctrl.memreq_addr_sel == MEMREQ_ADDR_EVICT) ? evict_addr_reg
                                                                       : refill_addr;
    memreq_msg.len      = 4'd0;
    memreq_msg.data     = (ctrl.memreq_type == MEM_WRITE) ? evict_data_reg : '0;

    cacheresp_msg.msg_type = type_reg;
    cacheresp_msg.opaque   = opaque_reg;
    cacheresp_msg.test     = ctrl.resp_test;
    cacheresp_msg.len      = 2'd0;
    cacheresp_msg.data     = (type_reg == MEM_READ) ? read_data_reg : '0;
  end

  assign req_type = type_reg;
  assign req_idx  = idx;

endmodule
