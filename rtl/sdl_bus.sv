// sdl_bus - shared bus connecting the process modules of an SDL system.
//
// N_NODES nodes, each with a transmit port (from its send component) and a
// receive port (to its signal queue or library component). Between signals
// a round-robin arbiter grants the bus to one requesting node whose
// destination is ready; a node whose destination queue is full does not
// hold up the others (otherwise a full queue could block the very process
// that would empty it). The grant is then held until that node has
// transferred the last word of its signal, so signals are never interleaved
// at a receiver. A word moves in the cycle in which the granted node
// requests and the destination node is ready: the word, its last flag and
// valid are routed combinationally to the destination, and tx_ack is
// returned combinationally to the sender; rx_valid therefore depends on
// rx_ready in the same cycle. After a signal the round-robin pointer moves
// past the node just served.
// Connecting all processes by one bus is the cheapest of the structures the
// framework offers; the arbitration scheme is this design's own choice.
module sdl_bus
  import sdl_pkg::*;
#(
  parameter int N_NODES = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  tx_req  [N_NODES],
  input  word_t tx_word [N_NODES],
  input  pid_t  tx_dest [N_NODES],
  input  logic  tx_last [N_NODES],
  output logic  tx_ack  [N_NODES],
  output logic  rx_valid[N_NODES],
  output word_t rx_word [N_NODES],
  output logic  rx_last [N_NODES],
  input  logic  rx_ready[N_NODES],
  output logic  busy_locked            // a signal transfer is in progress
);

  localparam int GW = (N_NODES > 1) ? $clog2(N_NODES) : 1;

  logic          locked_q;
  logic [GW-1:0] owner_q, rr_q, grant;
  logic          grant_valid;
  logic          fire;
  word_t         w;
  pid_t          d;
  logic          l;

  // A requester is eligible when its destination can take a word.
  logic eligible [N_NODES];
  always_comb begin
    for (int i = 0; i < N_NODES; i++) begin
      eligible[i] = 1'b0;
      for (int n = 0; n < N_NODES; n++)
        if (int'(tx_dest[i]) == n && tx_req[i] && rx_ready[n]) eligible[i] = 1'b1;
    end
  end

  // Round-robin choice among eligible nodes, starting at rr_q.
  always_comb begin
    int idx;
    idx         = 0;
    grant       = owner_q;
    grant_valid = 1'b0;
    if (locked_q) begin
      grant       = owner_q;
      grant_valid = tx_req[owner_q];
    end else begin
      for (int k = N_NODES-1; k >= 0; k--) begin
        idx = (int'(rr_q) + k) % N_NODES;
        if (eligible[idx]) begin
          grant       = GW'(idx);
          grant_valid = 1'b1;
        end
      end
    end
  end

  always_comb begin
    w = tx_word[grant];
    d = tx_dest[grant];
    l = tx_last[grant];
    fire = 1'b0;
    for (int n = 0; n < N_NODES; n++) begin
      rx_valid[n] = grant_valid && (int'(d) == n);
      rx_word[n]  = w;
      rx_last[n]  = l;
      tx_ack[n]   = 1'b0;
    end
    for (int n = 0; n < N_NODES; n++) begin
      if (grant_valid && int'(d) == n && rx_ready[n]) begin
        fire          = 1'b1;
        tx_ack[grant] = 1'b1;
      end
    end
  end

  assign busy_locked = locked_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      locked_q <= 1'b0;
      owner_q  <= '0;
      rr_q     <= '0;
    end else if (fire) begin
      if (l) begin
        locked_q <= 1'b0;
        rr_q     <= (int'(grant) == N_NODES-1) ? '0 : grant + GW'(1);
      end else begin
        locked_q <= 1'b1;
        owner_q  <= grant;
      end
    end
  end

  // A granted word must be addressed to an existing node.
  assert property (@(posedge clk) disable iff (!rst_n)
                   grant_valid |-> (int'(d) < N_NODES))
    else $error("sdl_bus: destination Pid out of range");

endmodule
