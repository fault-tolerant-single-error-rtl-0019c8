// ft_ecc_memory: a memory protected by a SEC-DED code whose encoder is itself fault tolerant.
//
// Write path: wr_data_i goes through ft_sec_encoder, and the K+R bit codeword is stored in
// ecc_memory_array. Read path: the stored codeword goes through sec_ded_decoder, which corrects
// any single bit error and flags double errors. Because the encoder computes every check bit
// with a separate XOR tree, a soft error in the encoder during a write corrupts at most one bit
// of the stored word, which the decoder then corrects on the read like a storage upset.
//
// Timing: a write takes effect at the clock edge where wr_en_i is high. rd_valid_o, rd_data_o,
// rd_syndrome_o, rd_single_err_o and rd_multi_err_o are valid in the cycle after rd_en_i
// (one cycle read latency; the decoder is combinational after the memory's read register).
// The upset inputs flip stored bits to model soft errors in the memory cells.
// The encoder/memory/decoder chain follows the published block diagram; the ports, the depth
// and the read latency are this design's choices.
module ft_ecc_memory
  import sec_pkg::*;
#(
  parameter int unsigned K     = 16,
  parameter int unsigned R     = 6,
  parameter int unsigned DEPTH = 256,
  localparam int unsigned N    = K + R,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // write port
  input  logic          wr_en_i,
  input  logic [AW-1:0] wr_addr_i,
  input  logic [K-1:0]  wr_data_i,
  // read port
  input  logic          rd_en_i,
  input  logic [AW-1:0] rd_addr_i,
  output logic          rd_valid_o,
  output logic [K-1:0]  rd_data_o,
  output logic [R-1:0]  rd_syndrome_o,
  output logic          rd_single_err_o,
  output logic          rd_multi_err_o,
  // soft error injection into the storage cells
  input  logic          upset_en_i,
  input  logic [AW-1:0] upset_addr_i,
  input  logic [N-1:0]  upset_mask_i
);

  logic [N-1:0] wr_codeword;
  logic [N-1:0] rd_codeword;

  ft_sec_encoder #(.K(K), .R(R)) u_enc (
    .data_i    (wr_data_i),
    .check_o   (),  // the check bits are taken from codeword_o
    .codeword_o(wr_codeword)
  );

  ecc_memory_array #(.N(N), .DEPTH(DEPTH)) u_mem (
    .clk         (clk),
    .rst_n       (rst_n),
    .wr_en_i     (wr_en_i),
    .wr_addr_i   (wr_addr_i),
    .wr_data_i   (wr_codeword),
    .rd_en_i     (rd_en_i),
    .rd_addr_i   (rd_addr_i),
    .rd_data_o   (rd_codeword),
    .upset_en_i  (upset_en_i),
    .upset_addr_i(upset_addr_i),
    .upset_mask_i(upset_mask_i)
  );

  sec_ded_decoder #(.K(K), .R(R)) u_dec (
    .codeword_i  (rd_codeword),
    .data_o      (rd_data_o),
    .syndrome_o  (rd_syndrome_o),
    .single_err_o(rd_single_err_o),
    .multi_err_o (rd_multi_err_o)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rd_valid_o <= 1'b0;
    else        rd_valid_o <= rd_en_i;
  end

endmodule
