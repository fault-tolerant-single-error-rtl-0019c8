// ft_sec_encoder_tb: self-checking test of the fault tolerant SEC-DED encoder.
//
// 1. Values: the (22,16) encoder against check equations written out here bit by bit, and the
//    (39,32) and (72,64) encoders against minimum odd-weight columns enumerated here with
//    nested loops, on walking-one and random data words.
// 2. Code: every (22,16) column has weight 3, and all are distinct, so every single error has
//    its own syndrome and no double error has a zero or single-error syndrome.
// 3. Fault tolerance: each XOR gate of every check-bit tree of the (22,16) encoder is forced
//    to the wrong value in turn; exactly the check bit that tree computes may change.
module ft_sec_encoder_tb;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  // watchdog
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [15:0] d16;  logic [5:0] c16;  logic [21:0] w16;
  logic [31:0] d32;  logic [6:0] c32;  logic [38:0] w32;
  logic [63:0] d64;  logic [7:0] c64;  logic [71:0] w64;

  ft_sec_encoder                 u22 (.data_i(d16), .check_o(c16), .codeword_o(w16));
  ft_sec_encoder #(.K(32), .R(7)) u39 (.data_i(d32), .check_o(c32), .codeword_o(w32));
  ft_sec_encoder #(.K(64), .R(8)) u72 (.data_i(d64), .check_o(c64), .codeword_o(w64));

  // (22,16): data bits summed by each check bit c1..c6.
  localparam int NSUM [6] = '{9, 8, 8, 8, 7, 8};
  localparam int SUMS [6][9] = '{
    '{0, 1, 2, 3, 4, 5, 7, 9, 10},
    '{0, 1, 2, 6, 7, 8, 11, 13, -1},
    '{0, 4, 6, 8, 9, 11, 12, 14, -1},
    '{5, 7, 9, 10, 11, 12, 13, 15, -1},
    '{1, 3, 8, 10, 12, 14, 15, -1, -1},
    '{2, 3, 4, 5, 6, 13, 14, 15, -1}
  };

  function automatic logic [5:0] ref22(input logic [15:0] d);
    logic [5:0] c = '0;
    for (int j = 0; j < 6; j++)
      for (int n = 0; n < NSUM[j]; n++) c[j] ^= d[SUMS[j][n]];
    return c;
  endfunction

  // Minimum odd-weight columns: weight 3 in increasing value, then weight 5.
  logic [7:0] col7 [32];
  logic [7:0] col8 [64];

  function automatic int ones(input logic [7:0] v);
    int n = 0;
    for (int b = 0; b < 8; b++) if (v[b]) n++;
    return n;
  endfunction

  task automatic build_cols(input int r, input int k, output logic [7:0] cols [64]);
    int cnt = 0;
    for (int hi = 2; hi < r; hi++)
      for (int mid = 1; mid < hi; mid++)
        for (int lo = 0; lo < mid; lo++) begin
          if (cnt < k) cols[cnt] = 8'((1 << hi) | (1 << mid) | (1 << lo));
          cnt++;
        end
    for (int v = 0; v < (1 << r); v++)
      if (ones(8'(v)) == 5) begin
        if (cnt < k) cols[cnt] = 8'(v);
        cnt++;
      end
  endtask

  function automatic logic [7:0] ref_gen(input logic [63:0] d, input int k,
                                         input logic [7:0] cols [64]);
    logic [7:0] c = '0;
    for (int i = 0; i < k; i++) if (d[i]) c ^= cols[i];
    return c;
  endfunction

  logic [7:0] cols39 [64];
  logic [7:0] cols72 [64];

  task automatic check_values();
    logic [5:0] e16;
    logic [7:0] e32, e64;
    #1;
    e16 = ref22(d16);
    e32 = ref_gen({32'h0, d32}, 32, cols39);
    e64 = ref_gen(d64, 64, cols72);
    checks += 3;
    if (c16 !== e16 || w16 !== {e16, d16}) begin
      failures++;
      $display("FAIL (22,16) d=%h check=%b expected %b", d16, c16, e16);
    end
    if (c32 !== e32[6:0] || w32 !== {e32[6:0], d32}) begin
      failures++;
      $display("FAIL (39,32) d=%h check=%b expected %b", d32, c32, e32[6:0]);
    end
    if (c64 !== e64 || w64 !== {e64, d64}) begin
      failures++;
      $display("FAIL (72,64) d=%h check=%b expected %b", d64, c64, e64);
    end
  endtask

  // ---- fault injection on each gate of the (22,16) encoder ----
  logic [5:0] golden;
  logic [5:0] faulty;

  // Force gate P of the tree of check bit J to the wrong value, check, release.
`define FLIP_GATE(J, P) begin \
    v = u22.g_chk[J].u_tree.g_tree.g_gate[P].y; \
    force u22.g_chk[J].u_tree.g_tree.g_gate[P].y = ~v; \
    #1 got = c16; \
    release u22.g_chk[J].u_tree.g_tree.g_gate[P].y; \
  end

  task automatic inject(input int j, input int p, output logic [5:0] got);
    logic v;
    got = c16;
    case ({3'(j), 4'(p)})
      {3'd0, 4'd0}: `FLIP_GATE(0, 0)
      {3'd0, 4'd1}: `FLIP_GATE(0, 1)
      {3'd0, 4'd2}: `FLIP_GATE(0, 2)
      {3'd0, 4'd3}: `FLIP_GATE(0, 3)
      {3'd0, 4'd4}: `FLIP_GATE(0, 4)
      {3'd0, 4'd5}: `FLIP_GATE(0, 5)
      {3'd0, 4'd6}: `FLIP_GATE(0, 6)
      {3'd0, 4'd7}: `FLIP_GATE(0, 7)
      {3'd1, 4'd0}: `FLIP_GATE(1, 0)
      {3'd1, 4'd1}: `FLIP_GATE(1, 1)
      {3'd1, 4'd2}: `FLIP_GATE(1, 2)
      {3'd1, 4'd3}: `FLIP_GATE(1, 3)
      {3'd1, 4'd4}: `FLIP_GATE(1, 4)
      {3'd1, 4'd5}: `FLIP_GATE(1, 5)
      {3'd1, 4'd6}: `FLIP_GATE(1, 6)
      {3'd2, 4'd0}: `FLIP_GATE(2, 0)
      {3'd2, 4'd1}: `FLIP_GATE(2, 1)
      {3'd2, 4'd2}: `FLIP_GATE(2, 2)
      {3'd2, 4'd3}: `FLIP_GATE(2, 3)
      {3'd2, 4'd4}: `FLIP_GATE(2, 4)
      {3'd2, 4'd5}: `FLIP_GATE(2, 5)
      {3'd2, 4'd6}: `FLIP_GATE(2, 6)
      {3'd3, 4'd0}: `FLIP_GATE(3, 0)
      {3'd3, 4'd1}: `FLIP_GATE(3, 1)
      {3'd3, 4'd2}: `FLIP_GATE(3, 2)
      {3'd3, 4'd3}: `FLIP_GATE(3, 3)
      {3'd3, 4'd4}: `FLIP_GATE(3, 4)
      {3'd3, 4'd5}: `FLIP_GATE(3, 5)
      {3'd3, 4'd6}: `FLIP_GATE(3, 6)
      {3'd4, 4'd0}: `FLIP_GATE(4, 0)
      {3'd4, 4'd1}: `FLIP_GATE(4, 1)
      {3'd4, 4'd2}: `FLIP_GATE(4, 2)
      {3'd4, 4'd3}: `FLIP_GATE(4, 3)
      {3'd4, 4'd4}: `FLIP_GATE(4, 4)
      {3'd4, 4'd5}: `FLIP_GATE(4, 5)
      {3'd5, 4'd0}: `FLIP_GATE(5, 0)
      {3'd5, 4'd1}: `FLIP_GATE(5, 1)
      {3'd5, 4'd2}: `FLIP_GATE(5, 2)
      {3'd5, 4'd3}: `FLIP_GATE(5, 3)
      {3'd5, 4'd4}: `FLIP_GATE(5, 4)
      {3'd5, 4'd5}: `FLIP_GATE(5, 5)
      {3'd5, 4'd6}: `FLIP_GATE(5, 6)
      default: ;
    endcase
    #1;
  endtask

  int faults_injected = 0;

  initial begin
    logic [5:0] cl [16];
    build_cols(7, 32, cols39);
    build_cols(8, 64, cols72);

    // code structure of the (22,16) table
    for (int i = 0; i < 16; i++) begin
      cl[i] = '0;
      for (int j = 0; j < 6; j++)
        for (int n = 0; n < NSUM[j]; n++) if (SUMS[j][n] == i) cl[i][j] = 1'b1;
    end
    for (int i = 0; i < 16; i++) begin
      checks++;
      if ($countones(cl[i]) != 3) begin
        failures++;
        $display("FAIL column %0d weight %0d", i, $countones(cl[i]));
      end
      for (int m = 0; m < i; m++) begin
        checks++;
        if (cl[i] == cl[m]) begin
          failures++;
          $display("FAIL columns %0d and %0d equal", i, m);
        end
      end
    end

    // walking one, all zero, all one
    d16 = '0; d32 = '0; d64 = '0; check_values();
    d16 = '1; d32 = '1; d64 = '1; check_values();
    for (int i = 0; i < 64; i++) begin
      d16 = 16'(1 << (i % 16));
      d32 = 32'(64'(1) << (i % 32));
      d64 = 64'(1) << i;
      check_values();
    end
    // random words
    for (int t = 0; t < 3000; t++) begin
      d16 = 16'($urandom);
      d32 = $urandom;
      d64 = {$urandom, $urandom};
      check_values();
    end

    // one fault at a time in every gate, for several data words
    for (int t = 0; t < 8; t++) begin
      d16 = (t == 0) ? 16'h0000 : (t == 1) ? 16'hFFFF : 16'($urandom);
      #1 golden = c16;
      for (int j = 0; j < 6; j++)
        for (int p = 0; p < NSUM[j] - 1; p++) begin
          inject(j, p, faulty);
          faults_injected++;
          checks++;
          if ((faulty ^ golden) !== 6'(1 << j)) begin
            failures++;
            $display("FAIL fault c%0d gate %0d d=%h: check bits %b, fault-free %b",
                     j + 1, p, d16, faulty, golden);
          end
        end
    end
    checks++;
    if (faults_injected != 8 * 42) begin
      failures++;
      $display("FAIL injected %0d faults, expected %0d", faults_injected, 8 * 42);
    end
    $display("gate faults injected: %0d", faults_injected);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
