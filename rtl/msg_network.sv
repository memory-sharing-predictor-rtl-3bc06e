// msg_network: point-to-point switch that carries one class of coherence
// messages between the nodes.
//
// Every input port has a FIFO of DEPTH messages. Each output port serves, in
// round-robin order, the inputs whose oldest message is addressed to it (the
// message's dst field), and passes at most one message per cycle. Messages
// from one source to one destination therefore stay in order, which the
// protocol relies on. An input accepts a message (valid && ready) whenever its
// FIFO is not full; an output hands over its message when out_valid &&
// out_ready. A message crosses an empty switch in one cycle.
//
// The document only names a switch-based point-to-point network; FIFO depth,
// arbitration and the ordering guarantee are this design's choices.
module msg_network
  import dsm_pkg::*;
#(
  parameter int unsigned PORTS = NODES,
  parameter int unsigned DEPTH = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid  [PORTS],
  output logic in_ready  [PORTS],
  input  msg_t in_msg    [PORTS],
  output logic out_valid [PORTS],
  input  logic out_ready [PORTS],
  output msg_t out_msg   [PORTS]
);

  localparam int unsigned PW = (PORTS > 1) ? $clog2(PORTS) : 1;
  localparam int unsigned DW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  msg_t                 fifo  [PORTS][DEPTH];
  logic [DW-1:0]        rdp   [PORTS];
  logic [DW-1:0]        wrp   [PORTS];
  logic [$clog2(DEPTH+1)-1:0] cnt [PORTS];
  logic [PW-1:0]        rr    [PORTS];
  logic                 pop   [PORTS];
  logic [PW-1:0]        gsel  [PORTS];

  // head-of-line request matrix and round-robin grant per output
  always_comb begin
    for (int o = 0; o < int'(PORTS); o++) begin
      logic found;
      found        = 1'b0;
      gsel[o]      = '0;
      for (int k = 0; k < int'(PORTS); k++) begin
        int unsigned i;
        i = (int'(rr[o]) + k) % PORTS;
        if (!found && cnt[i] != 0 && int'(fifo[i][rdp[i]].dst) == o) begin
          found   = 1'b1;
          gsel[o] = PW'(i);
        end
      end
      out_valid[o] = found;
      out_msg[o]   = fifo[gsel[o]][rdp[gsel[o]]];
    end
    for (int i = 0; i < int'(PORTS); i++) begin
      pop[i] = 1'b0;
      for (int o = 0; o < int'(PORTS); o++) begin
        if (out_valid[o] && out_ready[o] && int'(gsel[o]) == i) pop[i] = 1'b1;
      end
      in_ready[i] = (cnt[i] != DEPTH[$clog2(DEPTH+1)-1:0]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(PORTS); i++) begin
        rdp[i] <= '0;
        wrp[i] <= '0;
        cnt[i] <= '0;
        rr[i]  <= '0;
      end
    end else begin
      for (int i = 0; i < int'(PORTS); i++) begin
        logic push;
        push = in_valid[i] && in_ready[i];
        if (push) begin
          wrp[i] <= (int'(wrp[i]) == DEPTH - 1) ? '0 : wrp[i] + 1'b1;
        end
        if (pop[i]) begin
          rdp[i] <= (int'(rdp[i]) == DEPTH - 1) ? '0 : rdp[i] + 1'b1;
        end
        if (push && !pop[i]) cnt[i] <= cnt[i] + 1'b1;
        else if (!push && pop[i]) cnt[i] <= cnt[i] - 1'b1;
      end
      for (int o = 0; o < int'(PORTS); o++) begin
        if (out_valid[o] && out_ready[o])
          rr[o] <= (int'(gsel[o]) == PORTS - 1) ? '0 : gsel[o] + 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    for (int i = 0; i < int'(PORTS); i++) begin
      if (in_valid[i] && in_ready[i]) fifo[i][wrp[i]] <= in_msg[i];
    end
  end

endmodule
