// pi_round: one Pi-cipher round on a 16-word state, computed as a chain of
// eight * operations on a single custom ARX core.
//
// The state is four 4-word chunks I0..I3.  The first chain runs left to
// right, J0 = CI * I0 and Jn = J(n-1) * In; the second runs right to left,
// K3 = J3 * CR and Kn = Jn * K(n+1); the round's output is K0..K3.  In each
// operation the left operand goes to the core's X (mu) input and the right
// operand to its Y (nu) input.  The chaining, and which operand enters which
// port, follow the published design's round diagram; the round constants CI and CR
// are inputs, as the published design does not list them.
//
// Interface: pulse start with state_in, ci and cr valid; they are captured
// then.  done pulses for one cycle when state_out holds the result, and
// state_out keeps it until the next round finishes.  Each operation streams
// its operands to the core over the 32-bit buses (8 cycles), waits for the
// result and pops its four words: 17 cycles per operation, 137 cycles from
// start to done.
module pi_round
  import pi_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  quad_t state_in [4],
  input  quad_t ci,
  input  quad_t cr,
  output logic  busy,
  output logic  done,
  output quad_t state_out [4]
);
  localparam int unsigned BUS_W = 32;
  localparam int unsigned NCH   = 4 * W / BUS_W;

  typedef enum logic [1:0] {R_IDLE, R_FEED, R_COLLECT} rstate_e;

  rstate_e                st;
  quad_t                  i_q [4];
  quad_t                  j_q [4];
  quad_t                  k_q [4];
  quad_t                  ci_q, cr_q, xop, yop, res;
  logic [2:0]             op;
  logic [$clog2(NCH)-1:0] chunk;
  logic [1:0]             wcnt;
  logic [1:0]             m;
  logic                   core_ready, pop, op_valid, arx_flag, stall, arx_load;
  word_t                  op_bus;
  logic [4*W-1:0]         xflat, yflat;

  // operand selection for operation op
  assign m = 2'(3 - op[1:0]);
  always_comb begin
    if (!op[2]) begin
      xop = (op[1:0] == 2'd0) ? ci_q : j_q[op[1:0] - 2'd1];
      yop = i_q[op[1:0]];
    end else begin
      xop = j_q[m];
      yop = (m == 2'd3) ? cr_q : k_q[m + 2'd1];
    end
  end

  assign xflat    = xop;
  assign yflat    = yop;
  assign arx_load = (st == R_FEED) & core_ready;
  assign pop      = (st == R_COLLECT) & op_valid;
  assign busy     = (st != R_IDLE);

  arx_core #(.BUS_W(BUS_W)) u_core (
    .clk(clk), .rst_n(rst_n), .arx_load(arx_load),
    .inpx(xflat[chunk*BUS_W +: BUS_W]), .inpy(yflat[chunk*BUS_W +: BUS_W]),
    .ready(core_ready), .pop(pop), .op_bus(op_bus), .op_valid(op_valid),
    .arx_flag(arx_flag), .stall(stall)
  );

  // Results are drained as they arrive, so the core never waits for FIFO
  // room, and a result only appears while this controller collects it.
  assert property (@(posedge clk) disable iff (!rst_n) !stall);
  assert property (@(posedge clk) disable iff (!rst_n) arx_flag |-> st == R_COLLECT);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st    <= R_IDLE;
      op    <= '0;
      chunk <= '0;
      wcnt  <= '0;
      done  <= 1'b0;
      ci_q  <= '0;
      cr_q  <= '0;
      res   <= '0;
      for (int n = 0; n < 4; n++) begin
        i_q[n]       <= '0;
        j_q[n]       <= '0;
        k_q[n]       <= '0;
        state_out[n] <= '0;
      end
    end else begin
      done <= 1'b0;
      unique case (st)
        R_IDLE: if (start) begin
          i_q   <= state_in;
          ci_q  <= ci;
          cr_q  <= cr;
          op    <= '0;
          chunk <= '0;
          st    <= R_FEED;
        end
        R_FEED: if (core_ready) begin
          if (chunk == ($clog2(NCH))'(NCH - 1)) begin
            chunk <= '0;
            wcnt  <= '0;
            st    <= R_COLLECT;
          end else begin
            chunk <= chunk + 1'b1;
          end
        end
        R_COLLECT: if (op_valid) begin
          res[wcnt] <= op_bus;
          wcnt      <= wcnt + 1'b1;
          if (wcnt == 2'd3) begin
            quad_t r;
            r       = res;
            r[3]    = op_bus;
            if (!op[2]) j_q[op[1:0]] <= r;
            else        k_q[m]       <= r;
            if (op == 3'd7) begin
              for (int n = 1; n < 4; n++) state_out[n] <= k_q[n];
              state_out[0] <= r;
              done         <= 1'b1;
              st           <= R_IDLE;
            end else begin
              op <= op + 1'b1;
              st <= R_FEED;
            end
          end
        end
        default: st <= R_IDLE;
      endcase
    end
  end
endmodule
