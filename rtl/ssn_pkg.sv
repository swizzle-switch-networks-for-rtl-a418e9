// Shared constants and types of the Swizzle-Switch Network (SSN).
//
// The SSN joins 64 cores (each with private L1 caches) and 32 shared L2 banks
// through three single-stage crossbars built from Swizzle-Switches: L1->L2
// (requests, writebacks), L2->L1 (responses, invalidations) and L1->L1
// (shared-data forwarding). Port counts and the 128-bit bus width are the
// published configuration; the end-point buffer depth is this design's choice.
package ssn_pkg;

  localparam int unsigned SSN_N_L1  = 64;   // cores / L1 ports
  localparam int unsigned SSN_N_L2  = 32;   // L2 banks
  localparam int unsigned SSN_W     = 128;  // bus width of every switch
  localparam int unsigned SSN_DEPTH = 8;    // end-point buffer, flits (own choice)

  // State of a switch input controller (ss_input_port).
  typedef enum logic [0:0] {
    PS_ARB  = 1'b0,  // requesting, or sending the first beat once granted
    PS_DATA = 1'b1   // sending the remaining beats of a packet
  } port_state_e;

endpackage
