// ecc_memory: codeword storage of the ECC-protected memory.
//
// A DEPTH x 14-bit array with one synchronous write port, one synchronous
// read port (read data one cycle after rd_en; a read of the address being
// written in the same cycle returns the old word) and an upset-injection
// port. The upset port XORs inj_mask into the stored word at inj_addr; it
// models a radiation-induced upset of the stored cells and is how faults are
// put into the memory for test. If a write and an upset hit the same address
// in one cycle, the written word is stored with the upset applied.
// The memory only appears as a block between the encoder and the decoder in
// the system description; its depth, port structure and the upset port are
// this design's choices.
module ecc_memory
  import ecc_pkg::*;
#(
  parameter int unsigned DEPTH  = 256,
  parameter int unsigned ADDR_W = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              wr_en,
  input  logic [ADDR_W-1:0] wr_addr,
  input  cw_t               wr_data,
  input  logic              rd_en,
  input  logic [ADDR_W-1:0] rd_addr,
  output cw_t               rd_data,
  input  logic              inj_en,
  input  logic [ADDR_W-1:0] inj_addr,
  input  cw_t               inj_mask
);

  cw_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en && inj_en && wr_addr == inj_addr)
      mem[wr_addr] <= wr_data ^ inj_mask;
    else begin
      if (wr_en)  mem[wr_addr]  <= wr_data;
      if (inj_en) mem[inj_addr] <= mem[inj_addr] ^ inj_mask;
    end
    if (rd_en) rd_data <= mem[rd_addr];
  end

endmodule
