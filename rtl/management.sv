// management: the Moore state machine that controls one measurement.
//
// Inputs a1 (the 250 ms window) and a2 (the 4 ms window). Outputs depend on the
// state only:
//
//   state     count_ena  reg_ena  count_rst   next state
//   NACHALO       0         0         1       a1 ? (a2 ? COUNT : PAUSE) : NACHALO
//   COUNT         1         0         0       !a1 ? ZAPIS_A : !a2 ? PAUSE : COUNT
//   PAUSE         0         0         0       !a1 ? ZAPIS_A :  a2 ? COUNT : PAUSE
//   ZAPIS_A       0         1         0       ZAPIS_B
//   ZAPIS_B       0         1         0       NACHALO
//
// The 14 bit counter is therefore enabled only while both windows are open.
// When the long window closes, the register is written for two cycles and
// the counter is then held in reset until the next long window opens. The
// states NACHALO ("start"), COUNT, ZAPIS_A and ZAPIS_B ("write"), their
// order and their outputs are the design's; the PAUSE state, which a Moore
// machine needs to stop counting between short windows, and the choice of
// which input is which window are this implementation's. NACHALO is the reset
// state. Each output changes on the clock edge on which the state changes.
module management
  import tacho_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        a1,
  input  logic        a2,
  output logic        count_ena,
  output logic        reg_ena,
  output logic        count_rst,
  output mgmt_state_t state
);
  mgmt_state_t next_state;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= NACHALO;
    else        state <= next_state;
  end

  always_comb begin
    next_state = state;
    unique case (state)
      NACHALO: if (a1)       next_state = a2 ? COUNT : PAUSE;
      COUNT:   if (!a1)      next_state = ZAPIS_A;
               else if (!a2) next_state = PAUSE;
      PAUSE:   if (!a1)      next_state = ZAPIS_A;
               else if (a2)  next_state = COUNT;
      ZAPIS_A:               next_state = ZAPIS_B;
      ZAPIS_B:               next_state = NACHALO;
      default:               next_state = NACHALO;
    endcase
  end

  assign count_ena = (state == COUNT);
  assign reg_ena   = (state == ZAPIS_A) || (state == ZAPIS_B);
  assign count_rst = (state == NACHALO);
endmodule
