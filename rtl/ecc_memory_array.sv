// ecc_memory_array: the memory words that hold the encoded data, DEPTH words of N bits.
//
// One synchronous write port and one synchronous read port: a write lands at the clock edge,
// a read returns the word one clock after rd_en (rd_data_o holds its value in between). A read
// and a write to the same address in the same cycle return the old word.
// The upset port flips the bits of upset_mask_i in the word at upset_addr_i at the clock edge;
// it stands for soft errors in the storage cells, so that the error-correction path can be
// exercised. If a write and an upset hit the same word in one cycle, the upset applies to the
// newly written word. The storage is not reset, as in an SRAM; the read register is.
// Word count and port arrangement are this design's choice.
module ecc_memory_array #(
  parameter int unsigned N     = 22,
  parameter int unsigned DEPTH = 256,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          wr_en_i,
  input  logic [AW-1:0] wr_addr_i,
  input  logic [N-1:0]  wr_data_i,
  input  logic          rd_en_i,
  input  logic [AW-1:0] rd_addr_i,
  output logic [N-1:0]  rd_data_o,
  input  logic          upset_en_i,
  input  logic [AW-1:0] upset_addr_i,
  input  logic [N-1:0]  upset_mask_i
);

  logic [N-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en_i && upset_en_i && wr_addr_i == upset_addr_i) begin
      mem[wr_addr_i] <= wr_data_i ^ upset_mask_i;
    end else begin
      if (wr_en_i)    mem[wr_addr_i]    <= wr_data_i;
      if (upset_en_i) mem[upset_addr_i] <= mem[upset_addr_i] ^ upset_mask_i;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       rd_data_o <= '0;
    else if (rd_en_i) rd_data_o <= mem[rd_addr_i];
  end

endmodule
