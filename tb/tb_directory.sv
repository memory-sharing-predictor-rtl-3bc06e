// tb_directory: self-checking test of the directory.
// After reset every entry must read Idle with no sharers; random writes are
// mirrored in a reference array and every entry is read back. A write and a
// read of the same block in one cycle must return the old entry.
module tb_directory;
  import dsm_pkg::*;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  lblk_t      rd_blk, wr_blk;
  dir_entry_t rd_entry, wr_entry;
  logic       wr_en;
  int         checks = 0, failures = 0;
  dir_entry_t ref_mem [HOME_BLOCKS];

  directory dut (.clk, .rst_n, .rd_blk, .rd_entry, .wr_en, .wr_blk, .wr_entry);

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

  initial begin
    wr_en = 1'b0; wr_blk = '0; wr_entry = '0; rd_blk = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int i = 0; i < int'(HOME_BLOCKS); i++) begin
      rd_blk = lblk_t'(i);
      #1;
      check(rd_entry.st == D_IDLE && rd_entry.sharers == '0, $sformatf("reset entry %0d", i));
      ref_mem[i] = '{st: D_IDLE, owner: '0, sharers: '0};
    end
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      wr_en    = 1'b1;
      wr_blk   = lblk_t'($urandom_range(0, HOME_BLOCKS - 1));
      wr_entry = '{st: dstate_t'($urandom_range(0, 2)), owner: pid_t'($urandom), sharers: nvec_t'($urandom)};
      rd_blk   = wr_blk;
      #1;
      check(rd_entry == ref_mem[wr_blk], "same-cycle read returns old entry");
      ref_mem[wr_blk] = wr_entry;
    end
    @(negedge clk);
    wr_en = 1'b0;
    for (int i = 0; i < int'(HOME_BLOCKS); i++) begin
      rd_blk = lblk_t'(i);
      #1;
      check(rd_entry == ref_mem[i], $sformatf("read back entry %0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
