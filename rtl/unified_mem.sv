// unified_mem: the single memory that holds both instructions and data.
//
// One port, shared: the pipeline presents either the fetch PC or the
// load/store address. Reads are combinational on the word address (addr[31:2])
// so a fetched instruction is available at the end of the Fetch cycle and is
// captured by the Decode pipeline register; load data is available in the
// same cycle it is requested. Writes are synchronous with per-byte enables.
// That instructions and load/stores come from the same memory follows the
// design; the size (WORDS), the combinational read and the byte enables are
// this design's choices. Addresses beyond WORDS wrap.
module unified_mem
  import rv3_pkg::*;
#(
  parameter int unsigned WORDS = 4096
) (
  input  logic       clk,
  input  word_t      addr,
  input  logic       we,
  input  logic [3:0] be,
  input  word_t      wdata,
  output word_t      rdata
);

  localparam int unsigned AW = $clog2(WORDS);

  word_t          mem [WORDS];
  logic [AW-1:0]  widx;

  assign widx  = addr[AW+1:2];
  assign rdata = mem[widx];

  always_ff @(posedge clk) begin
    if (we) begin
      for (int i = 0; i < 4; i++)
        if (be[i]) mem[widx][8*i +: 8] <= wdata[8*i +: 8];
    end
  end

endmodule
