// sec_ded_decoder_tb: self-checking test of the SEC-DED decoder.
//
// Codewords are built here from check equations written out independently of the design
// (the (22,16) table as lists of data bits per check bit, the (72,64) code as minimum
// odd-weight columns enumerated with nested loops). Each codeword is then read clean, with
// every possible single-bit error and with every possible double-bit error (all pairs for
// (22,16), random pairs for (72,64)). Expected: clean and single-error words return the
// original data; single errors raise single_err_o only; double errors raise multi_err_o only;
// the syndrome equals the XOR of the columns of the flipped bits.
module sec_ded_decoder_tb;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int NSUM [6] = '{9, 8, 8, 8, 7, 8};
  localparam int SUMS [6][9] = '{
    '{0, 1, 2, 3, 4, 5, 7, 9, 10},
    '{0, 1, 2, 6, 7, 8, 11, 13, -1},
    '{0, 4, 6, 8, 9, 11, 12, 14, -1},
    '{5, 7, 9, 10, 11, 12, 13, 15, -1},
    '{1, 3, 8, 10, 12, 14, 15, -1, -1},
    '{2, 3, 4, 5, 6, 13, 14, 15, -1}
  };

  // Column of every codeword bit (data columns, then unit vectors for the check bits).
  logic [7:0] hcol22 [22];
  logic [7:0] hcol72 [72];

  logic [21:0] cw22;  logic [15:0] d22;  logic [5:0] s22;  logic se22, me22;
  logic [71:0] cw72;  logic [63:0] d72;  logic [7:0] s72;  logic se72, me72;

  sec_ded_decoder u22 (.codeword_i(cw22), .data_o(d22), .syndrome_o(s22),
                       .single_err_o(se22), .multi_err_o(me22));
  sec_ded_decoder #(.K(64), .R(8)) u72 (.codeword_i(cw72), .data_o(d72), .syndrome_o(s72),
                                        .single_err_o(se72), .multi_err_o(me72));

  function automatic int ones(input logic [7:0] v);
    int n = 0;
    for (int b = 0; b < 8; b++) if (v[b]) n++;
    return n;
  endfunction

  task automatic build_tables();
    int cnt = 0;
    for (int i = 0; i < 16; i++) begin
      hcol22[i] = '0;
      for (int j = 0; j < 6; j++)
        for (int n = 0; n < NSUM[j]; n++) if (SUMS[j][n] == i) hcol22[i][j] = 1'b1;
    end
    for (int j = 0; j < 6; j++) hcol22[16 + j] = 8'(1 << j);
    for (int hi = 2; hi < 8; hi++)
      for (int mid = 1; mid < hi; mid++)
        for (int lo = 0; lo < mid; lo++) begin
          hcol72[cnt] = 8'((1 << hi) | (1 << mid) | (1 << lo));
          cnt++;
        end
    for (int v = 0; v < 256 && cnt < 64; v++)
      if (ones(8'(v)) == 5) begin
        hcol72[cnt] = 8'(v);
        cnt++;
      end
    for (int j = 0; j < 8; j++) hcol72[64 + j] = 8'(1 << j);
  endtask

  function automatic logic [21:0] enc22(input logic [15:0] d);
    logic [5:0] c = '0;
    for (int i = 0; i < 16; i++) if (d[i]) c ^= hcol22[i][5:0];
    return {c, d};
  endfunction

  function automatic logic [71:0] enc72(input logic [63:0] d);
    logic [7:0] c = '0;
    for (int i = 0; i < 64; i++) if (d[i]) c ^= hcol72[i];
    return {c, d};
  endfunction

  // nerr: 0, 1 or 2 bits flipped; esyn: expected syndrome
  task automatic check22(input logic [15:0] d, input int nerr, input logic [5:0] esyn);
    #1;
    checks++;
    if (s22 !== esyn || se22 !== (nerr == 1) || me22 !== (nerr == 2) ||
        (nerr < 2 && d22 !== d)) begin
      failures++;
      $display("FAIL (22,16) d=%h errors=%0d: data=%h syn=%b single=%b multi=%b (syn expected %b)",
               d, nerr, d22, s22, se22, me22, esyn);
    end
  endtask

  task automatic check72(input logic [63:0] d, input int nerr, input logic [7:0] esyn);
    #1;
    checks++;
    if (s72 !== esyn || se72 !== (nerr == 1) || me72 !== (nerr == 2) ||
        (nerr < 2 && d72 !== d)) begin
      failures++;
      $display("FAIL (72,64) d=%h errors=%0d: data=%h syn=%b single=%b multi=%b",
               d, nerr, d72, s72, se72, me72);
    end
  endtask

  int n_single = 0;
  int n_double = 0;

  initial begin
    logic [15:0] d;
    logic [63:0] e;
    int a, b;
    build_tables();
    cw72 = '0;
    for (int t = 0; t < 12; t++) begin
      d = (t == 0) ? 16'h0000 : (t == 1) ? 16'hFFFF : 16'($urandom);
      cw22 = enc22(d);
      check22(d, 0, '0);
      for (int i = 0; i < 22; i++) begin
        cw22 = enc22(d) ^ (22'(1) << i);
        check22(d, 1, hcol22[i][5:0]);
        n_single++;
        for (int m = 0; m < i; m++) begin
          cw22 = enc22(d) ^ (22'(1) << i) ^ (22'(1) << m);
          check22(d, 2, hcol22[i][5:0] ^ hcol22[m][5:0]);
          n_double++;
        end
      end
    end
    cw22 = '0;
    for (int t = 0; t < 600; t++) begin
      e = {$urandom, $urandom};
      cw72 = enc72(e);
      check72(e, 0, '0);
      a = int'($urandom_range(71, 0));
      cw72 = enc72(e) ^ (72'(1) << a);
      check72(e, 1, hcol72[a]);
      b = int'($urandom_range(70, 0));
      if (b >= a) b++;
      cw72 = enc72(e) ^ (72'(1) << a) ^ (72'(1) << b);
      check72(e, 2, hcol72[a] ^ hcol72[b]);
    end
    $display("single errors %0d, double errors %0d (22,16), 600 words (72,64)", n_single, n_double);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
