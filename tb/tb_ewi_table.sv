// tb_ewi_table: self-checking test of the early-write-invalidate table.
// A reference model keeps the last written block per processor; for random
// writes the table must flag exactly the writes that go to a block other
// than the processor's previous one, and name that previous block.
module tb_ewi_table;
  import dsm_pkg::*;

  logic  clk = 1'b0;
  logic  rst_n = 1'b0;
  logic  upd_valid;
  pid_t  upd_pid;
  lblk_t upd_blk, stale_blk;
  logic  stale_valid;
  int    checks = 0, failures = 0;
  bit    rv [NODES];
  lblk_t rb [NODES];
  int    n_stale = 0;

  ewi_table dut (.clk, .rst_n, .upd_valid, .upd_pid, .upd_blk, .stale_valid, .stale_blk);

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
    for (int i = 0; i < int'(NODES); i++) begin rv[i] = 1'b0; rb[i] = '0; end
    upd_valid = 1'b0; upd_pid = '0; upd_blk = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      upd_valid = ($urandom_range(0, 3) != 0);
      upd_pid   = pid_t'($urandom);
      // few blocks so that repeated writes to the same block occur often
      upd_blk   = lblk_t'($urandom_range(0, 3));
      #1;
      if (upd_valid) begin
        check(stale_valid == (rv[upd_pid] && rb[upd_pid] != upd_blk), "stale flag");
        if (stale_valid) begin
          n_stale++;
          check(stale_blk == rb[upd_pid], "stale block");
        end
        rv[upd_pid] = 1'b1;
        rb[upd_pid] = upd_blk;
      end else begin
        check(!stale_valid, "no flag without update");
      end
    end
    check(n_stale > 100, "stale writes occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
