// inv_pkg - shared types and constants of the invasive linear array.
//
// Holds the five controller states of the per-PE invasion FSM (idle, master
// execution, invaded, infected, slave execution), the two-bit role flag each
// PE carries (free, master, slave), and the data widths of the FIR case-study
// datapath. The state set and the role names follow the design; the binary
// encodings and the data widths are this implementation's own choices.
package inv_pkg;

  // Controller states s0..s4.
  typedef enum logic [2:0] {
    S_IDLE       = 3'd0,   // s0: free, waiting for start or invade_in
    S_MASTER_EXE = 3'd1,   // s1: running as master of invasion
    S_INVADED    = 3'd2,   // s2: claimed by a neighbour, forwarding the invasion
    S_INFECTED   = 3'd3,   // s3: program being copied in, waiting for start
    S_SLAVE_EXE  = 3'd4    // s4: running the master's program as a slave
  } inv_state_t;

  // Two-bit flag register: identifies a PE as free, master or slave.
  typedef enum logic [1:0] {
    FLAG_FREE   = 2'b00,
    FLAG_MASTER = 2'b01,
    FLAG_SLAVE  = 2'b10
  } inv_flag_t;

  // Commands a master PE issues through its atomic invasive instructions.
  typedef enum logic [1:0] {
    CMD_NONE    = 2'd0,
    CMD_INVADE  = 2'd1,
    CMD_INFECT  = 2'd2,
    CMD_RETREAT = 2'd3
  } inv_cmd_t;

  // FIR case-study data widths.
  localparam int unsigned DATA_W = 16;   // samples and coefficients (signed)
  localparam int unsigned ACC_W  = 40;   // products and partial sums (signed)

  // Taps each PE of a region of p_plus_1 PEs computes for an n-tap filter:
  // ceil(n / p_plus_1). Taps beyond n get zero coefficients.
  function automatic int unsigned taps_per_pe(int unsigned n, int unsigned p_plus_1);
    return (n + p_plus_1 - 1) / p_plus_1;
  endfunction

endpackage
