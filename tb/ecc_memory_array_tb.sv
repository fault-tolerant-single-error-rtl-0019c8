// ecc_memory_array_tb: self-checking test of the codeword memory.
//
// A reference array in the testbench follows every write and upset. Random traffic mixes
// writes, reads and upsets (including all three on one address in one cycle). Every read is
// checked one clock after rd_en against the reference value at the time of the read, and the
// read register is checked to hold its value while rd_en is low.
module ecc_memory_array_tb;

  localparam int N = 22;
  localparam int DEPTH = 256;
  localparam int AW = 8;

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
  logic [N-1:0]  wr_data, rd_data, upset_mask;

  ecc_memory_array dut (
    .clk, .rst_n,
    .wr_en_i(wr_en), .wr_addr_i(wr_addr), .wr_data_i(wr_data),
    .rd_en_i(rd_en), .rd_addr_i(rd_addr), .rd_data_o(rd_data),
    .upset_en_i(upset_en), .upset_addr_i(upset_addr), .upset_mask_i(upset_mask)
  );

  logic [N-1:0] model [DEPTH];
  logic [N-1:0] expect_q;
  int n_reads = 0, n_upsets = 0, n_same_cycle = 0, n_holds = 0;

  task automatic idle();
    wr_en = 1'b0; rd_en = 1'b0; upset_en = 1'b0;
    wr_addr = '0; rd_addr = '0; upset_addr = '0; wr_data = '0; upset_mask = '0;
  endtask

  initial begin
    idle();
    rst_n = 1'b0;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (rd_data !== '0) begin
      failures++;
      $display("FAIL read register not reset: %h", rd_data);
    end
    rst_n = 1'b1;

    // fill every word
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      wr_en = 1'b1; wr_addr = AW'(a); wr_data = N'($urandom);
      model[a] = wr_data;
    end
    @(negedge clk) idle();

    // random traffic
    for (int t = 0; t < 6000; t++) begin
      bit do_rd;
      @(negedge clk);
      wr_en = ($urandom_range(2, 0) == 0);
      rd_en = ($urandom_range(1, 0) == 0);
      upset_en = ($urandom_range(3, 0) == 0);
      wr_addr = AW'($urandom);
      rd_addr = ($urandom_range(3, 0) == 0) ? wr_addr : AW'($urandom);
      upset_addr = ($urandom_range(3, 0) == 0) ? wr_addr : AW'($urandom);
      wr_data = N'($urandom);
      upset_mask = N'(1) << $urandom_range(N - 1, 0);
      if ($urandom_range(3, 0) == 0) upset_mask |= N'(1) << $urandom_range(N - 1, 0);
      do_rd = rd_en;
      if (rd_en) expect_q = model[rd_addr];  // old value on read-during-write
      else       expect_q = rd_data;         // register holds
      // update the reference
      if (wr_en) model[wr_addr] = wr_data;
      if (upset_en) begin
        model[upset_addr] = model[upset_addr] ^ upset_mask;
        n_upsets++;
        if (wr_en && wr_addr == upset_addr) n_same_cycle++;
      end
      @(posedge clk);
      #1;
      checks++;
      if (do_rd) n_reads++; else n_holds++;
      if (rd_data !== expect_q) begin
        failures++;
        $display("FAIL t=%0d read=%b addr=%0d: got %h expected %h", t, do_rd, rd_addr,
                 rd_data, expect_q);
      end
    end
    @(negedge clk) idle();

    // read every word back
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      rd_en = 1'b1; rd_addr = AW'(a);
      @(posedge clk);
      #1;
      checks++;
      if (rd_data !== model[a]) begin
        failures++;
        $display("FAIL final read %0d: got %h expected %h", a, rd_data, model[a]);
      end
    end
    checks++;
    if (n_same_cycle == 0 || n_upsets == 0 || n_holds == 0) begin
      failures++;
      $display("FAIL traffic did not cover upsets / write+upset / hold");
    end
    $display("reads %0d, holds %0d, upsets %0d, upsets on a word being written %0d",
             n_reads, n_holds, n_upsets, n_same_cycle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
