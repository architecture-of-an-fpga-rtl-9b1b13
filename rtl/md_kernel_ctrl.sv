// md_kernel_ctrl: control of one force-computation run (one kernel launch).
//
// On start it
//   CLEAR  zeroes the force records of atoms 0 .. n_atoms-1, one per cycle;
//   RUN    accepts n_pairs atom pairs from the pair-list stream, up to one
//          per lane and cycle, on every lane whose pair_valid bit is high
//          (pair_ready is high all through RUN; a cycle without any
//          pair_valid is counted as a starved cycle). The source must not
//          offer more pairs than remain;
//   DRAIN  waits until every accepted pair has left the pipeline (retire
//          bits, one per pair reaching the force accumulator);
//   DONE   holds done high until the next start.
// cycles counts the cycles from start to the end of DRAIN, the kernel time.
// start is ignored while busy.
//
// The single loop over the flat atom-pair list, with one pair entering the
// pipeline per cycle, is the accelerator's scheme; the clear sweep, the
// counters and the handshake are this design's choices.
module md_kernel_ctrl
  import md_pkg::*;
#(
  parameter int unsigned ADDR_W = 15,
  parameter int unsigned CNT_W  = 32,
  parameter int unsigned LANES  = 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [ADDR_W:0]   n_atoms,
  input  logic [CNT_W-1:0]  n_pairs,
  input  logic [LANES-1:0]  pair_valid,
  output logic              pair_ready,
  input  logic [LANES-1:0]  retire,
  output logic              clr_en,
  output logic [ADDR_W-1:0] clr_addr,
  output logic              busy,
  output logic              done,
  output kstate_e           state,
  output logic [CNT_W-1:0]  cycles,
  output logic [CNT_W-1:0]  accepted,
  output logic [CNT_W-1:0]  starved
);
  logic [CNT_W-1:0] inflight;
  logic [CNT_W-1:0] n_acc, n_ret;

  assign pair_ready = (state == ST_RUN);

  always_comb begin
    n_acc = '0;
    n_ret = '0;
    for (int l = 0; l < LANES; l++) begin
      n_acc = n_acc + CNT_W'(pair_ready && pair_valid[l]);
      n_ret = n_ret + CNT_W'(retire[l]);
    end
  end
  assign clr_en     = (state == ST_CLEAR);
  assign busy       = (state == ST_CLEAR) || (state == ST_RUN) || (state == ST_DRAIN);
  assign done       = (state == ST_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= ST_IDLE;
      clr_addr <= '0;
      cycles   <= '0;
      accepted <= '0;
      starved  <= '0;
      inflight <= '0;
    end else begin
      inflight <= inflight + n_acc - n_ret;
      if (busy) cycles <= cycles + 1'b1;
      unique case (state)
        ST_IDLE, ST_DONE: begin
          if (start) begin
            cycles   <= '0;
            accepted <= '0;
            starved  <= '0;
            clr_addr <= '0;
            if (n_atoms != '0)       state <= ST_CLEAR;
            else if (n_pairs != '0)  state <= ST_RUN;
            else                     state <= ST_DRAIN;
          end
        end
        ST_CLEAR: begin
          clr_addr <= clr_addr + 1'b1;
          if ({1'b0, clr_addr} == n_atoms - 1'b1)
            state <= (n_pairs != '0) ? ST_RUN : ST_DRAIN;
        end
        ST_RUN: begin
          if (n_acc != '0) begin
            accepted <= accepted + n_acc;
            if (accepted + n_acc >= n_pairs) state <= ST_DRAIN;
          end else begin
            starved <= starved + 1'b1;
          end
        end
        ST_DRAIN: begin
          if (inflight == '0 && n_ret == '0) state <= ST_DONE;
        end
        default: state <= ST_IDLE;
      endcase
    end
  end

  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n)
    n_ret <= inflight + n_acc);
  a_no_excess: assert property (@(posedge clk) disable iff (!rst_n)
    (state == ST_RUN) |-> (accepted + n_acc <= n_pairs));
endmodule
