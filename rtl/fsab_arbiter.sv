// fsab_arbiter: multiplexes N FSAB masters onto the single FSAB slave (the memory controller).
//
// Each master port has its own fsab_arbiter_fifo, which buffers whole transactions, moves them
// from the master's clock to the slave clock (clk) and returns credits to the master, so that
// to a master the arbiter behaves exactly like a slave. The arbiter itself keeps a count of
// the slave's credits (SLAVE_CREDITS at reset, minus one per transaction started, plus one per
// fsabo_credit pulse from the slave). When it is idle and holds a credit it starts the lowest-
// numbered port that has a transaction waiting, forwards that transaction's packets
// unchanged and waits for the port's done before choosing again. Priority is strictly fixed:
// port 0 (the preloader in the system) first, the screen-clear accelerator last. There is no
// fairness, as in the published design. A chosen transaction reaches the slave three cycles
// after start at the earliest (FIFO read plus output register).
module fsab_arbiter
  import vs_pkg::*;
#(
  parameter int N = 7,
  parameter int CREDITS = FSAB_CREDITS,
  parameter int SLAVE_CREDITS = FSAB_CREDITS
) (
  input  logic         clk,
  input  logic         rst_b,
  input  logic [N-1:0] m_clk,
  input  logic [N-1:0] m_rst_b,
  input  fsabo_t       m_fsabo [N],
  output logic [N-1:0] m_credit,
  output fsabo_t       fsabo,
  input  logic         fsabo_credit
);
  logic [N-1:0] avail, start, done;
  fsabo_t pkt [N];
  logic busy;
  logic [$clog2(N+1)-1:0] sel;
  logic [$clog2(SLAVE_CREDITS+1)-1:0] credits;

  for (genvar i = 0; i < N; i++) begin : g_port
    fsab_arbiter_fifo #(.CREDITS(CREDITS)) u_buf (
      .iclk(m_clk[i]), .iclk_rst_b(m_rst_b[i]), .in(m_fsabo[i]), .credit(m_credit[i]),
      .oclk(clk), .oclk_rst_b(rst_b), .avail(avail[i]), .start(start[i]), .pkt(pkt[i]),
      .done(done[i]));
  end

  // fixed priority choice
  logic found;
  logic [$clog2(N+1)-1:0] pick;
  always_comb begin
    found = 1'b0;
    pick  = '0;
    for (int i = N - 1; i >= 0; i--) begin
      if (avail[i]) begin
        found = 1'b1;
        pick  = ($clog2(N+1))'(i);
      end
    end
  end

  logic go;
  assign go = !busy && found && (credits != 0);
  always_comb begin
    start = '0;
    if (go) start[pick] = 1'b1;
  end

  always_comb begin
    fsabo = '0;
    for (int i = 0; i < N; i++) fsabo = fsabo | pkt[i];
  end

  always_ff @(posedge clk or negedge rst_b) begin
    if (!rst_b) begin
      busy <= 1'b0; sel <= '0; credits <= ($clog2(SLAVE_CREDITS+1))'(SLAVE_CREDITS);
    end else begin
      credits <= credits - ($clog2(SLAVE_CREDITS+1))'(go) + ($clog2(SLAVE_CREDITS+1))'(fsabo_credit);
      if (go) begin
        busy <= 1'b1;
        sel  <= pick;
      end else if (busy && done[sel]) begin
        busy <= 1'b0;
      end
    end
  end

  a_one_port: assert property (@(posedge clk) disable iff (!rst_b) $onehot0(done));
endmodule
