// cache_base_dpath: datapath of the direct-mapped blocking cache.
//
// Holds the accepted request, the tag and data arrays, and the registers that
// carry a line to and from main memory; the control unit (cache_base_ctrl)
// steers it one FSM state at a time through the cache_ctrl_t word.
//
// Address split (256 B, 16 lines of 16 B): tag = addr[31:8], idx = addr[7:4],
// word offset = addr[3:2]. Parts, in the order a transaction uses them:
//   * request registers (type, opaque, addr, data), loaded when a request is
//     accepted in the idle state;
//   * tag array (16 x 24 bit) and data array (16 x 128 bit), both comb_sram,
//     read combinationally at idx; tag_match compares the stored tag with the
//     request tag (the valid bit lives in the control unit);
//   * "rep1": the request word replicated four times, written with a one-word
//     enable for init and write accesses;
//   * "mkaddr": {tag, idx, 4'b0000}, the line address for refill and eviction;
//   * evict registers: victim address and line, loaded in evict-prepare;
//   * refill register: the line from memresp, written into the array in
//     refill-update;
//   * read-data register: the requested word, loaded in read-data-access.
// Request registers, tag/data arrays, rep1 and mkaddr follow the published
// description; the exact set of registers around the memory channels is this
// design's choice. Memory requests carry opaque 0 and len 0 (whole line);
// cache responses carry len 0 and, for reads only, the read word.
module cache_base_dpath
  import cache_msgs_pkg::*;
(
  input  logic          clk,

  input  mem_req_4B_t   cachereq_msg,
  output mem_resp_4B_t  cacheresp_msg,
  output mem_req_16B_t  memreq_msg,
  input  mem_resp_16B_t memresp_msg,

  input  cache_ctrl_t   ctrl,
  output mem_type_e     req_type,    // type of the held request
  output logic [3:0]    req_idx,     // line index of the held request
  output logic          tag_match    // stored tag equals request tag
);

  localparam int unsigned IDX_BITS = 4;
  localparam int unsigned TAG_BITS = 32 - IDX_BITS - OFFSET_BITS;  // 24

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

  // Tag array
  logic [TAG_BITS-1:0] tag_rdata;
  comb_sram #(.WIDTH(TAG_BITS), .DEPTH(NUM_LINES), .SLICE(TAG_BITS)) tag_array (
    .clk   (clk),
    .raddr (idx),
    .rdata (tag_rdata),
    .wen   (ctrl.tag_wen),
    .waddr (idx),
    .wben  (1'b1),
    .wdata (req_tag)
  );

  assign tag_match = (tag_rdata == req_tag);

  // Data array with its write-source mux
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

  logic [127:0] data_rdata;
  comb_sram #(.WIDTH(128), .DEPTH(NUM_LINES), .SLICE(32)) data_array (
    .clk   (clk),
    .raddr (idx),
    .rdata (data_rdata),
    .wen   (ctrl.data_wen),
    .waddr (idx),
    .wben  (data_wben),
    .wdata (data_wdata)
  );

  // mkaddr: line addresses for refill (request tag) and eviction (stored tag)
  logic [31:0] refill_addr;
  assign refill_addr = {req_tag, idx, 4'b0000};

  logic [31:0]  evict_addr_reg;
  logic [127:0] evict_data_reg;
  always_ff @(posedge clk) begin
    if (ctrl.evict_en) begin
      evict_addr_reg <= {tag_rdata, idx, 4'b0000};
      evict_data_reg <= data_rdata;
    end
  end

  always_ff @(posedge clk) begin
    if (ctrl.refill_en) refill_reg <= memresp_msg.data;
  end

  logic [31:0] read_data_reg;
  always_ff @(posedge clk) begin
    if (ctrl.read_data_en) read_data_reg <= data_rdata[woff*32 +: 32];
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
