// ft_ecc_memory_codes_tb: the protected memory built for the two larger codes of the cost
// comparison, (39,32) and (72,64), run with random writes, upsets and reads.
//
// Each size is a separate instance of ft_ecc_memory (64 words). The testbench keeps the data
// and the wrong-bit mask of every word. Words get zero, one or two storage upsets. Every read
// is checked one clock after rd_en: data corrected and the right flag raised. The syndrome of
// a single upset is checked against a column list enumerated here independently: weight-3
// columns in increasing value, then weight-5, with unit vectors for the check bits.
module ft_ecc_memory_codes_tb;

  localparam int DEPTH = 64;
  localparam int AW = 6;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic          rst_n;
  logic          wr_en, rd_en, upset_en;
  logic [AW-1:0] wr_addr, rd_addr, upset_addr;
  logic [63:0]   wr_data;
  logic [38:0]   upset_mask39;
  logic [71:0]   upset_mask72;

  logic          v39, se39, me39;
  logic [31:0]   d39;
  logic [6:0]    s39;
  logic          v72, se72, me72;
  logic [63:0]   d72;
  logic [7:0]    s72;

  ft_ecc_memory #(.K(32), .R(7), .DEPTH(DEPTH)) u39 (
    .clk, .rst_n,
    .wr_en_i(wr_en), .wr_addr_i(wr_addr), .wr_data_i(wr_data[31:0]),
    .rd_en_i(rd_en), .rd_addr_i(rd_addr), .rd_valid_o(v39), .rd_data_o(d39),
    .rd_syndrome_o(s39), .rd_single_err_o(se39), .rd_multi_err_o(me39),
    .upset_en_i(upset_en), .upset_addr_i(upset_addr), .upset_mask_i(upset_mask39)
  );

  ft_ecc_memory #(.K(64), .R(8), .DEPTH(DEPTH)) u72 (
    .clk, .rst_n,
    .wr_en_i(wr_en), .wr_addr_i(wr_addr), .wr_data_i(wr_data),
    .rd_en_i(rd_en), .rd_addr_i(rd_addr), .rd_valid_o(v72), .rd_data_o(d72),
    .rd_syndrome_o(s72), .rd_single_err_o(se72), .rd_multi_err_o(me72),
    .upset_en_i(upset_en), .upset_addr_i(upset_addr), .upset_mask_i(upset_mask72)
  );

  logic [7:0] col39 [39];
  logic [7:0] col72 [72];

  function automatic int ones(input logic [7:0] v);
    int n = 0;
    for (int b = 0; b < 8; b++) if (v[b]) n++;
    return n;
  endfunction

  task automatic build(input int r, input int k, output logic [7:0] cols [72]);
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
    for (int j = 0; j < r; j++) cols[k + j] = 8'(1 << j);
  endtask

  logic [63:0] model [DEPTH];
  logic [71:0] errs  [DEPTH];   // wrong bits of the (72,64) word
  logic [38:0] errs39 [DEPTH];  // the same errors in the (39,32) word

  int n_single = 0, n_double = 0, n_clean = 0;

  task automatic idle();
    wr_en = 1'b0; rd_en = 1'b0; upset_en = 1'b0;
    wr_addr = '0; rd_addr = '0; upset_addr = '0; wr_data = '0;
    upset_mask39 = '0; upset_mask72 = '0;
  endtask

  initial begin
    logic [7:0] c39 [72];
    logic [7:0] c72 [72];
    int a, op, b1, b2, b1s, b2s, n;
    build(7, 32, c39);
    build(8, 64, c72);
    idle();
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      wr_en = 1'b1; wr_addr = AW'(i); wr_data = {$urandom, $urandom};
      model[i] = wr_data; errs[i] = '0; errs39[i] = '0;
      @(posedge clk);
      #1 idle();
    end
    for (int t = 0; t < 4000; t++) begin
      a = int'($urandom_range(DEPTH - 1, 0));
      op = int'($urandom_range(5, 0));
      n = $countones(errs39[a]);
      @(negedge clk);
      if (op == 0) begin
        wr_en = 1'b1; wr_addr = AW'(a); wr_data = {$urandom, $urandom};
        model[a] = wr_data; errs[a] = '0; errs39[a] = '0;
      end else if (op <= 2 && n == 0) begin
        // the same data bit, or the same check bit index, in both codes
        b1 = int'($urandom_range(38, 0));
        b2 = int'($urandom_range(37, 0));
        if (b2 >= b1) b2++;
        b1s = (b1 < 32) ? b1 : b1 + 32;   // bit position in the (72,64) word
        b2s = (b2 < 32) ? b2 : b2 + 32;
        upset_en = 1'b1; upset_addr = AW'(a);
        upset_mask39 = 39'(1) << b1;
        upset_mask72 = 72'(1) << b1s;
        if (op == 2) begin
          upset_mask39 |= 39'(1) << b2;
          upset_mask72 |= 72'(1) << b2s;
        end
        errs39[a] = upset_mask39;
        errs[a] = upset_mask72;
      end else begin
        rd_en = 1'b1; rd_addr = AW'(a);
      end
      @(posedge clk);
      #1;
      if (rd_en) begin
        n = $countones(errs39[a]);
        checks += 2;
        if (!v39 || !v72) begin
          failures++;
          $display("FAIL rd_valid missing");
        end
        if (n == 0) begin
          if (d39 !== model[a][31:0] || d72 !== model[a] || se39 || me39 || se72 || me72) begin
            failures++;
            $display("FAIL clean read %0d", a);
          end else n_clean++;
        end else if (n == 1) begin
          b1 = 0;
          for (int i = 0; i < 39; i++) if (errs39[a][i]) b1 = i;
          b1s = (b1 < 32) ? b1 : b1 + 32;
          if (d39 !== model[a][31:0] || !se39 || me39 || 8'(s39) !== c39[b1]) begin
            failures++;
            $display("FAIL (39,32) single error bit %0d at %0d: syn %b expected %b", b1, a,
                     s39, c39[b1]);
          end
          if (d72 !== model[a] || !se72 || me72 || s72 !== c72[b1s]) begin
            failures++;
            $display("FAIL (72,64) single error bit %0d at %0d: syn %b expected %b", b1s, a,
                     s72, c72[b1s]);
          end
          n_single++;
        end else begin
          if (se39 || !me39 || se72 || !me72) begin
            failures++;
            $display("FAIL double error at %0d not flagged", a);
          end
          n_double++;
        end
      end
      idle();
    end
    checks++;
    if (n_single == 0 || n_double == 0 || n_clean == 0) begin
      failures++;
      $display("FAIL a case never occurred");
    end
    $display("clean %0d, single corrected %0d, double detected %0d", n_clean, n_single, n_double);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
