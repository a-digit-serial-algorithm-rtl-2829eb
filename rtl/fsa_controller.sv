// fsa_controller: state machine and loop counter of the FSA powering unit.
//
// Six states: Load (the reset state; waits for load), Init (the i = 1 step),
// then for every index i = 3 .. K-1 the three sub-stages Loop_DLG, Loop_ACC
// and Loop_EXP, one clock each, and finally Ready (one clock) which returns
// to Load. The counter holds i; it is 1 during Init so that the ROM address
// and the bit checkers see the right index there too, is set to 3 when Init
// ends and advances after each Loop_EXP. The FSM starts and stops the
// counting.
//
// Timing: with load high in Load at clock edge 0, Init is the state after
// edge 0, the loop occupies 3*(K-3) clocks and Ready is the state after edge
// 3*(K-3)+1, so a result appears 3*(K-3)+2 clocks after the load clock.
// The states and their order are the published controller's; one clock
// per sub-stage and the one-clock Ready are this design's reading of it.
module fsa_controller
  import fsa_pkg::*;
#(
  parameter int K = 128
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 load,
  output state_t               state,
  output logic [$clog2(K)-1:0] count,
  output logic                 ready,
  output logic                 busy
);

  localparam int CW = $clog2(K);
  localparam logic [CW-1:0] LAST = CW'(K - 1);

  state_t state_d;

  always_comb begin
    state_d = state;
    unique case (state)
      ST_LOAD:     if (load) state_d = ST_INIT;
      ST_INIT:     state_d = (K > 3) ? ST_LOOP_DLG : ST_READY;
      ST_LOOP_DLG: state_d = ST_LOOP_ACC;
      ST_LOOP_ACC: state_d = ST_LOOP_EXP;
      ST_LOOP_EXP: state_d = (count == LAST) ? ST_READY : ST_LOOP_DLG;
      ST_READY:    state_d = ST_LOAD;
      default:     state_d = ST_LOAD;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= ST_LOAD;
      count <= CW'(1);
    end else begin
      state <= state_d;
      unique case (state)
        ST_LOAD:     count <= CW'(1);
        ST_INIT:     count <= CW'(3);
        ST_LOOP_EXP: if (count != LAST) count <= count + CW'(1);
        default:     ;
      endcase
    end
  end

  assign ready = (state == ST_READY);
  assign busy  = (state != ST_LOAD) && (state != ST_READY);

  // The counter stays within the table while the loop runs.
  a_count_range: assert property (@(posedge clk) disable iff (!rst_n)
    (state inside {ST_LOOP_DLG, ST_LOOP_ACC, ST_LOOP_EXP}) |-> (count >= 3 && count <= LAST));
  // Ready always returns to Load.
  a_ready_to_load: assert property (@(posedge clk) disable iff (!rst_n)
    (state == ST_READY) |=> (state == ST_LOAD));

endmodule
