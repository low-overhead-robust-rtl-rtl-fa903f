// fir_controller: sequencer of the FIR datapath. It walks the nine control
// steps of the scheduled data-flow graph and produces every select, strobe
// and enable of the four functional-unit slices and the two register groups.
//
// States: IDLE waits for start. Each control step s = 1..9 then takes a LOAD
// cycle (operand multiplexers set to the leg of the unit's operation in s,
// operand latches strobed, the register groups' read select set to the
// register consumed in s) and an EXEC cycle (unit enabled, result latch
// strobed, the register written in s strobed). OUT follows step 9: A1's
// de-multiplexer is on the output leg and out_stb asks the core to capture
// the result. Each unit's de-multiplexer select is a register that remembers
// the leg of the unit's last operation, so a result stays routed to its
// consumer until the unit produces the next one. The schedule and binding
// are the document's; the state machine, the two-cycle step and the
// remembered de-multiplexer select are this design's.
// Timing: start seen in IDLE -> 18 cycles of steps -> 1 OUT cycle; busy is
// high from the first LOAD cycle to the OUT cycle inclusive.
module fir_controller
  import fir_sig_pkg::*;
(
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      start,
  output fu_ctrl_t  [NFU-1:0]       fu_ctrl,
  output reg_ctrl_t [1:0]           reg_ctrl,
  output logic                      out_stb,
  output logic                      busy
);
  typedef enum logic [1:0] {S_IDLE, S_LOAD, S_EXEC, S_OUT} state_e;

  state_e                     state;
  logic [3:0]                 step;
  logic [NFU-1:0][LEGW-1:0]   dsel_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      step   <= '0;
      dsel_q <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          state <= S_LOAD;
          step  <= 4'd1;
        end
        S_LOAD: state <= S_EXEC;
        S_EXEC: begin
          for (int f = 0; f < int'(NFU); f++) begin
            slot_t s;
            s = schedule(fu_id_e'(f), int'(step));
            if (s.act) dsel_q[f] <= s.leg;
          end
          if (int'(step) == int'(NSTEPS)) state <= S_OUT;
          else begin
            state <= S_LOAD;
            step  <= step + 4'd1;
          end
        end
        S_OUT: begin
          state <= S_IDLE;
          step  <= '0;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    for (int f = 0; f < int'(NFU); f++) begin
      slot_t s;
      s = schedule(fu_id_e'(f), int'(step));
      fu_ctrl[f].sel  = (state == S_LOAD && s.act) ? s.leg : '0;
      fu_ctrl[f].lstr = (state == S_LOAD) && s.act;
      fu_ctrl[f].en   = (state == S_EXEC) && s.act;
      fu_ctrl[f].ostr = (state == S_EXEC) && s.act;
      fu_ctrl[f].dsel = dsel_q[f];
    end
    for (int g = 0; g < 2; g++) begin
      rslot_t w, r;
      w = reg_write(g[0], int'(step));
      r = reg_read(g[0], int'(step));
      reg_ctrl[g].wsel = w.idx;
      reg_ctrl[g].str  = (state == S_EXEC) && w.act;
      reg_ctrl[g].rsel = r.act ? r.idx : 2'd0;
    end
    out_stb = (state == S_OUT);
    busy    = (state != S_IDLE);
  end

  a_step_range: assert property (@(posedge clk) disable iff (!rst_n)
                                 (state inside {S_LOAD, S_EXEC}) |-> (step >= 4'd1 && step <= 4'(NSTEPS)));
endmodule
