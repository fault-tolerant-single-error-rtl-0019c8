// ft_sec_encoder: fault tolerant encoder for a systematic (K+R, K) SEC-DED code.
//
// A plain encoder shares XOR gates between check bits to save area; a soft error on a shared
// gate then flips two or more check bits, which looks like a double error in the stored word
// and cannot be corrected. Here every check bit has its own XOR tree (one parity_tree instance,
// kept as a separate hierarchy), so a soft error anywhere in the encoder flips at most one bit
// of the codeword. The decoder then corrects it like an upset in a memory cell, which gives the
// encoder the protection level of the memory at a fraction of the cost of triplication.
// For the (22,16) code this takes 42 two-input XOR gates (48 ones in the parity part minus one
// per check bit).
//
// Interface: data_i is the K-bit data word; check_o[j] is check bit c(j+1); codeword_o holds the
// data in [K-1:0] and the check bits in [K+R-1:K]. Purely combinational.
// The code itself comes from sec_pkg: the (22,16) table by default, generated minimum
// odd-weight columns for other sizes.
module ft_sec_encoder
  import sec_pkg::*;
#(
  parameter int unsigned K = 16,
  parameter int unsigned R = 6
) (
  input  logic [K-1:0]   data_i,
  output logic [R-1:0]   check_o,
  output logic [K+R-1:0] codeword_o
);

  initial begin
    assert (K <= MAX_K && R <= MAX_R && K <= max_data_bits(R))
      else $error("ft_sec_encoder: no SEC-DED code with K=%0d, R=%0d", K, R);
  end

  for (genvar j = 0; j < R; j++) begin : g_chk
    localparam logic [K-1:0] MASK = row_mask(K, R, j)[K-1:0];
    parity_tree #(.W(K), .MASK(MASK)) u_tree (
      .data_i  (data_i),
      .parity_o(check_o[j])
    );
  end

  assign codeword_o = {check_o, data_i};

endmodule
