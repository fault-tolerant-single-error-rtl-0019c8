// sec_ded_decoder: single error correcting, double error detecting decoder for the code of
// sec_pkg.
//
// It recomputes the check bits from the received data bits and XORs them with the received
// check bits to form the syndrome. A zero syndrome means no error. A syndrome equal to the
// column of data bit i means data bit i is wrong and it is flipped back. A syndrome with a
// single one means a check bit is wrong; the data is already right. Any other odd-weight
// syndrome, and every nonzero even-weight one, is an error the code cannot correct
// (a double error gives an even-weight syndrome) and is flagged.
//
// Interface: codeword_i as produced by ft_sec_encoder; data_o is the corrected data;
// syndrome_o the raw syndrome; single_err_o is set when one bit was corrected; multi_err_o when
// the word holds an uncorrectable error. Purely combinational. The decoder is taken as fault
// free, so it is a plain, unprotected implementation.
module sec_ded_decoder
  import sec_pkg::*;
#(
  parameter int unsigned K = 16,
  parameter int unsigned R = 6
) (
  input  logic [K+R-1:0] codeword_i,
  output logic [K-1:0]   data_o,
  output logic [R-1:0]   syndrome_o,
  output logic           single_err_o,
  output logic           multi_err_o
);

  logic [K-1:0] data_rx;
  logic [R-1:0] check_rx;
  logic [K-1:0] flip;
  logic         data_hit;

  assign data_rx  = codeword_i[K-1:0];
  assign check_rx = codeword_i[K+R-1:K];

  for (genvar j = 0; j < R; j++) begin : g_syn
    localparam logic [K-1:0] MASK = row_mask(K, R, j)[K-1:0];
    assign syndrome_o[j] = check_rx[j] ^ (^(data_rx & MASK));
  end

  // One comparator per data bit: does the syndrome point at this bit?
  for (genvar i = 0; i < K; i++) begin : g_loc
    localparam logic [R-1:0] COL = code_col(K, R, i)[R-1:0];
    assign flip[i] = (syndrome_o == COL);
  end

  assign data_hit = |flip;
  assign data_o   = data_rx ^ flip;

  always_comb begin
    single_err_o = 1'b0;
    multi_err_o  = 1'b0;
    if (syndrome_o != '0) begin
      // (s & (s - 1)) == 0 with s nonzero: exactly one check bit is wrong
      if (data_hit || (syndrome_o & (syndrome_o - 1'b1)) == '0) single_err_o = 1'b1;
      else multi_err_o = 1'b1;
    end
  end

endmodule
