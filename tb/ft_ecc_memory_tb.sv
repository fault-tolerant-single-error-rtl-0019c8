// ft_ecc_memory_tb: end-to-end test of the protected memory at its default size
// ((22,16) code, 256 words).
//
// Random traffic of writes, reads and soft errors. The testbench keeps its own copy of every
// word's data and of which codeword bits are currently wrong. Soft errors reach the stored
// words in two ways: through the upset port (one or two storage bits flipped) and through the
// encoder, by forcing one XOR gate of one check-bit tree to the wrong value during a write.
// Each read is checked one clock after rd_en: a word with no wrong bit must come back with no
// flag, one wrong bit must be corrected and flagged as single, two must be flagged as
// uncorrectable. The check-bit patterns below list, for each check bit, the data bits it
// sums, and are used to predict the syndrome of an encoder fault.
// Counted mechanisms (each must occur): clean read, corrected data-bit upset, corrected
// check-bit upset, corrected encoder fault, detected double error, error removed by a rewrite.
module ft_ecc_memory_tb;

  localparam int K = 16;
  localparam int R = 6;
  localparam int N = 22;
  localparam int DEPTH = 256;
  localparam int AW = 8;
  localparam int NSUM [6] = '{9, 8, 8, 8, 7, 8};

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic          rst_n;
  logic          wr_en, rd_en, upset_en;
  logic [AW-1:0] wr_addr, rd_addr, upset_addr;
  logic [K-1:0]  wr_data, rd_data;
  logic [N-1:0]  upset_mask;
  logic          rd_valid, rd_single, rd_multi;
  logic [R-1:0]  rd_syn;

  ft_ecc_memory dut (
    .clk, .rst_n,
    .wr_en_i(wr_en), .wr_addr_i(wr_addr), .wr_data_i(wr_data),
    .rd_en_i(rd_en), .rd_addr_i(rd_addr), .rd_valid_o(rd_valid), .rd_data_o(rd_data),
    .rd_syndrome_o(rd_syn), .rd_single_err_o(rd_single), .rd_multi_err_o(rd_multi),
    .upset_en_i(upset_en), .upset_addr_i(upset_addr), .upset_mask_i(upset_mask)
  );

  // Force gate P of the encoder tree of check bit J to the wrong value over one write edge.
`define TOP_FLIP(J, P) begin \
    v = dut.u_enc.g_chk[J].u_tree.g_tree.g_gate[P].y; \
    force dut.u_enc.g_chk[J].u_tree.g_tree.g_gate[P].y = ~v; \
    @(posedge clk); \
    #1 release dut.u_enc.g_chk[J].u_tree.g_tree.g_gate[P].y; \
  end

  task automatic write_with_fault(input int j, input int p);
    logic v;
    case ({3'(j), 4'(p)})
      {3'd0, 4'd0}: `TOP_FLIP(0, 0)
      {3'd0, 4'd1}: `TOP_FLIP(0, 1)
      {3'd0, 4'd2}: `TOP_FLIP(0, 2)
      {3'd0, 4'd3}: `TOP_FLIP(0, 3)
      {3'd0, 4'd4}: `TOP_FLIP(0, 4)
      {3'd0, 4'd5}: `TOP_FLIP(0, 5)
      {3'd0, 4'd6}: `TOP_FLIP(0, 6)
      {3'd0, 4'd7}: `TOP_FLIP(0, 7)
      {3'd1, 4'd0}: `TOP_FLIP(1, 0)
      {3'd1, 4'd1}: `TOP_FLIP(1, 1)
      {3'd1, 4'd2}: `TOP_FLIP(1, 2)
      {3'd1, 4'd3}: `TOP_FLIP(1, 3)
      {3'd1, 4'd4}: `TOP_FLIP(1, 4)
      {3'd1, 4'd5}: `TOP_FLIP(1, 5)
      {3'd1, 4'd6}: `TOP_FLIP(1, 6)
      {3'd2, 4'd0}: `TOP_FLIP(2, 0)
      {3'd2, 4'd1}: `TOP_FLIP(2, 1)
      {3'd2, 4'd2}: `TOP_FLIP(2, 2)
      {3'd2, 4'd3}: `TOP_FLIP(2, 3)
      {3'd2, 4'd4}: `TOP_FLIP(2, 4)
      {3'd2, 4'd5}: `TOP_FLIP(2, 5)
      {3'd2, 4'd6}: `TOP_FLIP(2, 6)
      {3'd3, 4'd0}: `TOP_FLIP(3, 0)
      {3'd3, 4'd1}: `TOP_FLIP(3, 1)
      {3'd3, 4'd2}: `TOP_FLIP(3, 2)
      {3'd3, 4'd3}: `TOP_FLIP(3, 3)
      {3'd3, 4'd4}: `TOP_FLIP(3, 4)
      {3'd3, 4'd5}: `TOP_FLIP(3, 5)
      {3'd3, 4'd6}: `TOP_FLIP(3, 6)
      {3'd4, 4'd0}: `TOP_FLIP(4, 0)
      {3'd4, 4'd1}: `TOP_FLIP(4, 1)
      {3'd4, 4'd2}: `TOP_FLIP(4, 2)
      {3'd4, 4'd3}: `TOP_FLIP(4, 3)
      {3'd4, 4'd4}: `TOP_FLIP(4, 4)
      {3'd4, 4'd5}: `TOP_FLIP(4, 5)
      {3'd5, 4'd0}: `TOP_FLIP(5, 0)
      {3'd5, 4'd1}: `TOP_FLIP(5, 1)
      {3'd5, 4'd2}: `TOP_FLIP(5, 2)
      {3'd5, 4'd3}: `TOP_FLIP(5, 3)
      {3'd5, 4'd4}: `TOP_FLIP(5, 4)
      {3'd5, 4'd5}: `TOP_FLIP(5, 5)
      {3'd5, 4'd6}: `TOP_FLIP(5, 6)
      default: @(posedge clk);
    endcase
  endtask

  logic [K-1:0] model [DEPTH];
  logic [N-1:0] errs  [DEPTH];   // codeword bits currently wrong in each word
  bit           valid [DEPTH];

  int n_clean = 0, n_data_fix = 0, n_check_fix = 0, n_enc_fix = 0, n_double = 0;
  int n_rewrite = 0, n_rewrite_seen = 0;
  bit enc_fault [DEPTH];
  bit rewritten [DEPTH];

  task automatic idle();
    wr_en = 1'b0; rd_en = 1'b0; upset_en = 1'b0;
    wr_addr = '0; rd_addr = '0; upset_addr = '0; wr_data = '0; upset_mask = '0;
  endtask

  task automatic do_write(input int a, input bit with_fault);
    int j, p;
    @(negedge clk);
    wr_en = 1'b1; wr_addr = AW'(a); wr_data = K'($urandom);
    if (valid[a] && errs[a] != '0) begin
      n_rewrite++;
      rewritten[a] = 1'b1;
    end else begin
      rewritten[a] = 1'b0;
    end
    model[a] = wr_data;
    valid[a] = 1'b1;
    errs[a] = '0;
    enc_fault[a] = with_fault;
    if (with_fault) begin
      j = int'($urandom_range(R - 1, 0));
      p = int'($urandom_range(NSUM[j] - 2, 0));
      errs[a] = N'(1) << (K + j);
      #1 write_with_fault(j, p);  // let the encoder settle before sampling the gate
    end else begin
      @(posedge clk);
    end
    #1 idle();
  endtask

  task automatic do_upset(input int a, input logic [N-1:0] m);
    @(negedge clk);
    upset_en = 1'b1; upset_addr = AW'(a); upset_mask = m;
    errs[a] ^= m;
    enc_fault[a] = 1'b0;
    rewritten[a] = 1'b0;
    @(posedge clk);
    #1 idle();
  endtask

  task automatic do_read(input int a);
    int nerr;
    @(negedge clk);
    rd_en = 1'b1; rd_addr = AW'(a);
    @(posedge clk);
    #1 idle();
    nerr = $countones(errs[a]);
    checks++;
    if (!rd_valid) begin
      failures++;
      $display("FAIL read of %0d: rd_valid low one cycle after rd_en", a);
    end
    case (nerr)
      0: begin
        if (rd_data !== model[a] || rd_single || rd_multi || rd_syn !== '0) begin
          failures++;
          $display("FAIL clean read %0d: data %h/%h single %b multi %b", a, rd_data, model[a],
                   rd_single, rd_multi);
        end else begin
          n_clean++;
          if (rewritten[a]) begin
            n_rewrite_seen++;
            rewritten[a] = 1'b0;
          end
        end
      end
      1: begin
        if (rd_data !== model[a] || !rd_single || rd_multi) begin
          failures++;
          $display("FAIL single error %0d (bits %b): data %h/%h single %b multi %b", a, errs[a],
                   rd_data, model[a], rd_single, rd_multi);
        end else if (enc_fault[a]) begin
          n_enc_fix++;
          checks++;
          if (rd_syn !== errs[a][N-1:K]) begin
            failures++;
            $display("FAIL encoder fault %0d: syndrome %b, wrong check bits %b", a, rd_syn,
                     errs[a][N-1:K]);
          end
        end else if (errs[a][K-1:0] != '0) n_data_fix++;
        else n_check_fix++;
      end
      default: begin
        if (rd_single || !rd_multi) begin
          failures++;
          $display("FAIL double error %0d (bits %b) not flagged: single %b multi %b", a,
                   errs[a], rd_single, rd_multi);
        end else n_double++;
      end
    endcase
    // rd_valid drops the cycle after
    @(posedge clk);
    #1;
    checks++;
    if (rd_valid) begin
      failures++;
      $display("FAIL rd_valid high without a read");
    end
  endtask

  initial begin
    int a, op, nerr, bit1, bit2;
    logic [N-1:0] m;
    idle();
    for (int i = 0; i < DEPTH; i++) begin
      valid[i] = 1'b0; errs[i] = '0; enc_fault[i] = 1'b0; rewritten[i] = 1'b0;
    end
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    for (int i = 0; i < DEPTH; i++) do_write(i, 1'b0);

    for (int t = 0; t < 8000; t++) begin
      a = ($urandom_range(3, 0) == 0) ? int'($urandom_range(DEPTH - 1, 0))
                                       : int'($urandom_range(15, 0));
      op = int'($urandom_range(9, 0));
      nerr = $countones(errs[a]);
      if (op < 2) do_write(a, 1'b0);
      else if (op < 4) do_write(a, 1'b1);
      else if (op < 6 && nerr < 2) begin
        bit1 = int'($urandom_range(N - 1, 0));
        while (errs[a][bit1]) bit1 = int'($urandom_range(N - 1, 0));
        m = N'(1) << bit1;
        if (nerr == 0 && $urandom_range(2, 0) == 0) begin
          bit2 = int'($urandom_range(N - 1, 0));
          while (bit2 == bit1) bit2 = int'($urandom_range(N - 1, 0));
          m |= N'(1) << bit2;
        end
        do_upset(a, m);
      end else do_read(a);
    end

    checks += 6;
    if (n_clean == 0)        begin failures++; $display("FAIL no clean read"); end
    if (n_data_fix == 0)     begin failures++; $display("FAIL no data-bit upset corrected"); end
    if (n_check_fix == 0)    begin failures++; $display("FAIL no check-bit upset corrected"); end
    if (n_enc_fix == 0)      begin failures++; $display("FAIL no encoder fault corrected"); end
    if (n_double == 0)       begin failures++; $display("FAIL no double error detected"); end
    if (n_rewrite_seen == 0) begin failures++; $display("FAIL no error removed by a rewrite"); end
    $display("clean reads %0d, corrected: data-bit upsets %0d, check-bit upsets %0d, encoder faults %0d; double errors detected %0d; rewrites over an error %0d (read back clean %0d)",
             n_clean, n_data_fix, n_check_fix, n_enc_fix, n_double, n_rewrite, n_rewrite_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
