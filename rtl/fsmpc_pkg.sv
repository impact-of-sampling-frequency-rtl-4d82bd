// fsmpc_pkg: constants shared by the finite-set model predictive current
// controller for a two-level four-leg inverter.
//
// The inverter has four switch legs u, v, w and x, so there are 2^4 = 16
// switching states. Candidate j drives the legs with S = j, bit 3 = Su,
// bit 2 = Sv, bit 1 = Sw, bit 0 = Sx (this bit order is a choice of this design).
// Each candidate is costed by a scheduled datapath of N states; every state
// lasts WL clock cycles because the functional units work one bit per cycle.
// One sampling period therefore needs CC = 2^n * N * WL cycles, plus a fixed
// overhead of this implementation (one cycle to accept the sample and one to
// compare the last cost and drive the gates).
package fsmpc_pkg;

  localparam int unsigned N_SWITCHES = 4;                // n: legs u, v, w, x
  localparam int unsigned N_CAND     = 1 << N_SWITCHES;  // 16 switching states

  // Bit positions of the legs in a switching-state vector.
  localparam int unsigned SW_U = 3;
  localparam int unsigned SW_V = 2;
  localparam int unsigned SW_W = 1;
  localparam int unsigned SW_X = 0;

  // Indices of the three controlled phases in current arrays.
  localparam int unsigned PH_U = 0;
  localparam int unsigned PH_V = 1;
  localparam int unsigned PH_W = 2;

  // Schedule lengths of the two datapath architectures.
  localparam int unsigned STATES_4FU = 11;  // two adders, two multipliers
  localparam int unsigned STATES_6FU = 8;   // three adders, three multipliers

  // Cycles from the sample_start cycle to the done cycle beyond CC.
  localparam int unsigned SAMPLE_OVERHEAD = 2;

  // Number of datapath states for a given number of functional units.
  function automatic int unsigned states_for(input int unsigned num_fu);
    return (num_fu == 6) ? STATES_6FU : STATES_4FU;
  endfunction

  // Clock cycles of one sampling period, CC = 2^n * N * WL.
  function automatic int unsigned cycles_per_sample(input int unsigned num_fu,
                                                    input int unsigned wl);
    return N_CAND * states_for(num_fu) * wl;
  endfunction

endpackage
