// sec_pkg: the parity-check structure shared by the SEC-DED encoder, the decoder and the
// testbenches.
//
// A (K+R, K) systematic code is written here column by column: column i (0 <= i < K) is the
// R-bit vector of check bits that data bit i feeds. Bit j of a column stands for check bit
// c(j+1). The codeword keeps the data in bits [K-1:0] and the check bits in bits [K+R-1:K],
// the same order as the generator matrix G = [I | P] of the (22,16) code.
//
// For the default (22,16) code the columns are a fixed table (H22_COLS). Ten of its rows are
// the ones of the published generator matrix; data bits 6, 8, 12, 13, 14 and 15 use the
// remaining weight-3 columns, picked so that every check bit sums 7 to 9 data bits. Every
// column has weight 3 (odd) and all columns are distinct and differ from the unit vectors, which
// is what makes the code correct single errors and detect double errors.
//
// For any other size (the (39,32) and (72,64) codes, for example) the columns are generated:
// all weight-3 vectors of R bits in increasing numeric order, then weight-5 ones, and so on,
// which is the minimum odd-weight-column construction. That generation is a choice of this
// design; the published code tables for those sizes are not reproduced.
package sec_pkg;

  localparam int unsigned MAX_K = 64;
  localparam int unsigned MAX_R = 8;

  typedef logic [MAX_R-1:0] col_t;   // bit j = check bit c(j+1)
  typedef logic [MAX_K-1:0] mask_t;  // bit i = data bit b(i)

  // (22,16) parity part, written c1..c6 from left to right.
  typedef logic [0:5] col22_t;
  localparam col22_t H22_COLS [16] = '{
    6'b111000,  // b0
    6'b110010,  // b1
    6'b110001,  // b2
    6'b100011,  // b3
    6'b101001,  // b4
    6'b100101,  // b5
    6'b011001,  // b6
    6'b110100,  // b7
    6'b011010,  // b8
    6'b101100,  // b9
    6'b100110,  // b10
    6'b011100,  // b11
    6'b001110,  // b12
    6'b010101,  // b13
    6'b001011,  // b14
    6'b000111   // b15
  };

  function automatic int unsigned popcount(input logic [31:0] v);
    int unsigned n = 0;
    for (int b = 0; b < 32; b++) n += int'(v[b]);
    return n;
  endfunction

  // i-th vector of odd weight >= 3 over r bits, lowest weight first, then increasing value.
  function automatic col_t gen_col(input int unsigned r, input int unsigned i);
    int unsigned cnt = 0;
    for (int unsigned w = 3; w <= r; w += 2) begin
      for (int unsigned v = 0; v < (1 << r); v++) begin
        if (popcount(v) == w) begin
          if (cnt == i) return col_t'(v);
          cnt++;
        end
      end
    end
    return '0;  // too few check bits for this many data bits
  endfunction

  // Column of data bit i for the (k+r, k) code.
  function automatic col_t code_col(input int unsigned k, input int unsigned r,
                                    input int unsigned i);
    col_t c = '0;
    if (k == 16 && r == 6) begin
      for (int j = 0; j < 6; j++) c[j] = H22_COLS[i][j];
      return c;
    end
    return gen_col(r, i);
  endfunction

  // Data bits that check bit j sums (row j of the parity part).
  function automatic mask_t row_mask(input int unsigned k, input int unsigned r,
                                     input int unsigned j);
    mask_t m = '0;
    for (int unsigned i = 0; i < k; i++) m[i] = |(code_col(k, r, i) & (col_t'(1) << j));
    return m;
  endfunction

  // Number of odd-weight (>= 3) columns available with r check bits.
  function automatic int unsigned max_data_bits(input int unsigned r);
    int unsigned n = 0;
    for (int unsigned v = 0; v < (1 << r); v++)
      if (popcount(v) >= 3 && popcount(v) % 2 == 1) n++;
    return n;
  endfunction

endpackage
