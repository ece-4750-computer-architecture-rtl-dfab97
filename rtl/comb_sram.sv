// comb_sram: memory array with a combinational read port and a clocked write port.
//
// The caches keep their tags and lines in arrays that are read in the same
// cycle the index is presented, so a tag check or a data access takes one
// state of the controlling FSM. A write is done at the rising clock edge, in
// slices of SLICE bits: bit i of wben enables slice i, so a cache can
// overwrite a single 32-bit word of a line or the whole line at once.
// Interface: raddr/rdata (combinational), wen/waddr/wben/wdata (synchronous).
// The contents are not reset; the caches' valid bits tell which entries hold
// data. Read-during-write to the same entry returns the old contents.
module comb_sram #(
  parameter int unsigned WIDTH = 128,
  parameter int unsigned DEPTH = 16,
  parameter int unsigned SLICE = 32,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned NS = WIDTH / SLICE
) (
  input  logic             clk,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata,
  input  logic             wen,
  input  logic [AW-1:0]    waddr,
  input  logic [NS-1:0]    wben,
  input  logic [WIDTH-1:0] wdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  assign rdata = mem[raddr];

  always_ff @(posedge clk) begin
    if (wen) begin
      for (int s = 0; s < int'(NS); s++) begin
        if (wben[s]) mem[waddr][s*SLICE +: SLICE] <= wdata[s*SLICE +: SLICE];
      end
    end
  end

  initial begin
    assert (WIDTH % SLICE == 0) else $error("comb_sram: WIDTH must be a multiple of SLICE");
  end

endmodule
