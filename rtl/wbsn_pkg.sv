// Shared constants and types of the NVM-based eight-core bio-signal platform.
//
// Holds the synchronizer command encoding and the platform power states
// (both this design's own choices; the platform description gives the
// synchronizer's duties but no encoding), and the formula that defines the
// starting content of the non-volatile store in simulation.
package wbsn_pkg;

  // Synchronizer commands a core can issue.
  typedef enum logic [1:0] {
    SYNC_BARRIER = 2'd0,  // wait until every core of the mask in sync_arg arrives
    SYNC_NOTIFY  = 2'd1,  // raise the event flag of every core in sync_arg
    SYNC_WAIT    = 2'd2,  // wait for (and consume) this core's event flag
    SYNC_SLEEP   = 2'd3   // sleep until the next sample (deep-sleep sensing)
  } sync_op_e;

  // Platform power state kept by the synchronizer.
  typedef enum logic [1:0] {
    PS_ACTIVE = 2'd0,  // cores run
    PS_FLUSH  = 2'd1,  // all cores asleep, dirty pages go back to NVM
    PS_DEEP   = 2'd2,  // digital domain power gated, sensing only
    PS_WAKE   = 2'd3   // power restored, cores released next cycle
  } pwr_state_e;

  // Initial content of the non-volatile store used by simulation models:
  // a fixed mix of the word address, so any word read can be predicted.
  function automatic logic [31:0] nvm_init_word(input int unsigned word_addr);
    logic [31:0] a;
    a = word_addr;
    return (a * 32'h9E37_79B1) ^ 32'h5A5A_0000 ^ a;
  endfunction

endpackage
