// tb_home_memory: self-checking test of the home memory.
// Random whole-block writes are mirrored in a reference array; every written
// block is read back, and a same-cycle read returns the old contents.
module tb_home_memory;
  import dsm_pkg::*;

  logic   clk = 1'b0;
  lblk_t  rd_blk, wr_blk;
  block_t rd_data, wr_data;
  logic   wr_en;
  int     checks = 0, failures = 0;
  block_t ref_mem [HOME_BLOCKS];
  bit     known   [HOME_BLOCKS];

  home_memory dut (.clk, .rd_blk, .rd_data, .wr_en, .wr_blk, .wr_data);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic block_t rnd_block();
    block_t b;
    for (int w = 0; w < int'(WORDS); w++) b[w*WORD_W +: WORD_W] = $urandom;
    return b;
  endfunction

  initial begin
    for (int i = 0; i < int'(HOME_BLOCKS); i++) known[i] = 1'b0;
    wr_en = 1'b0; wr_blk = '0; wr_data = '0; rd_blk = '0;
    for (int n = 0; n < 800; n++) begin
      @(negedge clk);
      wr_en   = 1'b1;
      wr_blk  = lblk_t'($urandom_range(0, HOME_BLOCKS - 1));
      wr_data = rnd_block();
      rd_blk  = wr_blk;
      #1;
      if (known[wr_blk]) check(rd_data == ref_mem[wr_blk], "same-cycle read returns old block");
      ref_mem[wr_blk] = wr_data;
      known[wr_blk]   = 1'b1;
    end
    @(negedge clk);
    wr_en = 1'b0;
    for (int i = 0; i < int'(HOME_BLOCKS); i++) begin
      rd_blk = lblk_t'(i);
      #1;
      if (known[i]) check(rd_data == ref_mem[i], $sformatf("read back block %0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
