`timescale 1ns/1ps
// router_pkg: constants and small helper functions shared by the SPAD-array
// router. The router connects a large array of single-photon detectors to a
// few shared time-measurement channels (F-TACs). Each channel has one
// multilevel comparison line; the pixels compete for the lines bit by bit on
// the basis of a priority word that changes every excitation period.
//
// Conventions used throughout the design:
//  * channel index k = 0..NUM_CH-1; k = NUM_CH-1 is F-TAC 5 / line L5 (the
//    MSB of a state register), k = 0 is F-TAC 1 / line L1 (the LSB).
//  * a line "level" is the number of pixels drawing current from the line,
//    as resolved by the comparators; it saturates at NUM_CH.
// The channel count (5), the priority width (10 bits for a 32x32 array) and
// the saturation of the thermometric code follow the published circuit.
package router_pkg;

  localparam int unsigned NUM_CH    = 5;   // shared F-TAC channels
  localparam int unsigned LEVEL_W   = $clog2(NUM_CH + 1);

  typedef logic [LEVEL_W-1:0] level_t;    // 0..NUM_CH current sources on a line
  typedef logic [NUM_CH-1:0]  chmask_t;   // one bit per channel, MSB = L5

  // Thermometric code of a level: `lvl` ones starting from the MSB.
  function automatic chmask_t thermo(input level_t lvl);
    chmask_t t;
    for (int i = 0; i < NUM_CH; i++)
      t[NUM_CH-1-i] = (int'(lvl) > i);
    return t;
  endfunction

  // Index of the most significant set bit of a mask (0 when the mask is empty).
  function automatic int unsigned first_one(input chmask_t m);
    int unsigned idx;
    idx = 0;
    for (int i = 0; i < NUM_CH; i++)
      if (m[i]) idx = i;
    return idx;
  endfunction

endpackage
