// acq_controller - sequences the RSSE acquisition.
//
// The steps of the method map onto four states:
//   ST_IDLE   waiting for start.
//   ST_ACQ    start clears every soft-chip delay unit (step 1); the decoder
//             recurses on each received chip (steps 2-3). When the
//             reliability condition holds the loading command is given
//             (step 4): the generator takes the hard decisions and the
//             tracking loop restarts its dwell.
//   ST_VERIFY the replica despreads the input (step 5). A passing dwell
//             means the phase is held: ST_LOCK. A failing dwell is the
//             reloading command: back to ST_ACQ, which loads the next
//             reliable group of S chips.
//   ST_LOCK   acquired; a failing dwell here means the phase was lost and
//             also leads to a reload.
// The soft-chip register keeps recursing in every state. After a failed
// verification it is not cleared, so the next load uses the reliabilities
// gathered so far. After a loss of lock it is cleared as at start: its
// saturated LLRs describe the old phase, and the recursion would otherwise
// keep regenerating that phase. Both are this design's choices; the method
// only asks for another group of S chips to be loaded. The counters report how many loads and
// reloads happened and the number of chips received from start until the
// most recent load, the acquisition time measure of the method.
//
// Interface and timing: en marks a received chip. load is combinational
// (ST_ACQ and ready) and acts at the same clock edge; state and counters are
// registered. reload pulses combinationally with the failing dump.
module acq_controller #(
  parameter int unsigned CNT_W = 20
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic             en,
  input  logic             ready,
  input  logic             dump,
  input  logic             pass,
  output logic             scr_clr,
  output logic             load,
  output logic             reload,
  output logic             trk_clr,
  output logic             locked,
  output rsse_pkg::acq_state_e state,
  output logic [CNT_W-1:0] n_loads,
  output logic [CNT_W-1:0] n_reloads,
  output logic [CNT_W-1:0] chips,
  output logic [CNT_W-1:0] chips_at_load
);

  import rsse_pkg::*;

  acq_state_e st_q, st_d;

  always_comb begin
    st_d    = st_q;
    scr_clr = 1'b0;
    load    = 1'b0;
    reload  = 1'b0;
    trk_clr = 1'b0;
    if (start) begin
      scr_clr = 1'b1;
      trk_clr = 1'b1;
      st_d    = ST_ACQ;
    end else begin
      unique case (st_q)
        ST_IDLE: ;
        ST_ACQ: begin
          if (ready) begin
            load    = 1'b1;
            trk_clr = 1'b1;
            st_d    = ST_VERIFY;
          end
        end
        ST_VERIFY, ST_LOCK: begin
          if (dump) begin
            if (pass) begin
              st_d = ST_LOCK;
            end else begin
              reload  = 1'b1;
              scr_clr = (st_q == ST_LOCK);
              st_d    = ST_ACQ;
            end
          end
        end
        default: st_d = ST_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q          <= ST_IDLE;
      n_loads       <= '0;
      n_reloads     <= '0;
      chips         <= '0;
      chips_at_load <= '0;
    end else begin
      st_q <= st_d;
      if (start) begin
        n_loads       <= '0;
        n_reloads     <= '0;
        chips         <= '0;
        chips_at_load <= '0;
      end else begin
        if (en && chips != '1) chips <= chips + 1'b1;
        if (load) begin
          n_loads       <= n_loads + 1'b1;
          chips_at_load <= chips;
        end
        if (reload) n_reloads <= n_reloads + 1'b1;
      end
    end
  end

  assign state  = st_q;
  assign locked = (st_q == ST_LOCK);

  // A reload only ever follows a load that is being verified or held.
  assert property (@(posedge clk) disable iff (!rst_n)
                   reload |-> (st_q == ST_VERIFY || st_q == ST_LOCK));
  // The loading command is never given while a load is being checked.
  assert property (@(posedge clk) disable iff (!rst_n)
                   load |-> (st_q == ST_ACQ));

endmodule
