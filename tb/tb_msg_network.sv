// tb_msg_network: self-checking test of the message switch.
// 16 sources inject messages with random destinations; each message carries
// its source and a per-(source,destination) sequence number in its data
// field. Sinks accept at random. Every message must leave at its destination
// exactly once and in order per source/destination pair. A lone message must
// cross the empty switch in one cycle.
module tb_msg_network;
  import dsm_pkg::*;

  localparam int P = NODES;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid [P], in_ready [P], out_valid [P], out_ready [P];
  msg_t in_msg [P], out_msg [P];
  int   checks = 0, failures = 0;
  int   sent_seq [P][P];
  int   recv_seq [P][P];
  int   sent = 0, recvd = 0;
  bit   inject_on;

  msg_network #(.PORTS(P), .DEPTH(2)) dut (.clk, .rst_n, .in_valid, .in_ready, .in_msg,
                                          .out_valid, .out_ready, .out_msg);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
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

  function automatic msg_t mk(int s, int d, int seq);
    msg_t m;
    m       = '0;
    m.mtype = M_READ;
    m.src   = pid_t'(s);
    m.dst   = pid_t'(d);
    m.data[31:0] = 32'(seq);
    return m;
  endfunction

  // sources
  always @(posedge clk) begin
    if (rst_n) begin
      for (int s = 0; s < P; s++) begin
        if (in_valid[s] && in_ready[s]) begin
          sent_seq[s][in_msg[s].dst]++;
          sent++;
          in_valid[s] <= 1'b0;
        end
      end
    end
  end

  always @(negedge clk) begin
    if (rst_n && inject_on) begin
      for (int s = 0; s < P; s++) begin
        if (!in_valid[s] && $urandom_range(0, 2) == 0) begin
          int d;
          d = $urandom_range(0, P - 1);
          in_msg[s]   = mk(s, d, sent_seq[s][d]);
          in_valid[s] = 1'b1;
        end
      end
    end
    for (int o = 0; o < P; o++) out_ready[o] = ($urandom_range(0, 3) != 0);
  end

  // sinks
  always @(posedge clk) begin
    if (rst_n) begin
      for (int o = 0; o < P; o++) begin
        if (out_valid[o] && out_ready[o]) begin
          int s;
          s = int'(out_msg[o].src);
          check(int'(out_msg[o].dst) == o, "delivered to its destination");
          check(int'(out_msg[o].data[31:0]) == recv_seq[s][o], "in order per pair");
          recv_seq[s][o]++;
          recvd++;
        end
      end
    end
  end

  initial begin
    for (int s = 0; s < P; s++) begin
      in_valid[s] = 1'b0; in_msg[s] = '0; out_ready[s] = 1'b1;
      for (int d = 0; d < P; d++) begin sent_seq[s][d] = 0; recv_seq[s][d] = 0; end
    end
    inject_on = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // latency of a lone message
    @(negedge clk);
    in_msg[3] = mk(3, 9, 0);
    in_valid[3] = 1'b1;
    @(posedge clk); #1;
    @(negedge clk);
    check(out_valid[9] && out_msg[9].src == 3, "one-cycle crossing");
    repeat (5) @(posedge clk);
    inject_on = 1'b1;
    repeat (4000) @(posedge clk);
    inject_on = 1'b0;
    repeat (300) @(posedge clk);
    check(sent > 5000, "traffic was injected");
    check(sent == recvd, $sformatf("all delivered (%0d sent, %0d received)", sent, recvd));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
