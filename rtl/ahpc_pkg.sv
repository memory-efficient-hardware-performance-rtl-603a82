// ahpc_pkg: shared constants, types and helper functions of the approximate
// hardware performance counter (AHPC) unit.
//
// The unit replaces each 64-bit deterministic event counter by a "Morris group
// counter": GROUP_SIZE small counters of COUNTER_W bits that each count
// logarithmically (increment with probability 1/2^X) and whose estimates 2^X
// are averaged when the counter is read.
//
// Numbers that follow the design description: 6-bit Morris counters, 5 of them
// per group, 29 counters with 29 event selector registers, 64-bit estimate
// range, and the twelve monitored event kinds. The LFSR polynomial, the seeds
// and the event numbering are this implementation's own choices.
package ahpc_pkg;

  // Morris counter state width (X) and group size.
  parameter int unsigned COUNTER_W    = 6;
  parameter int unsigned GROUP_SIZE   = 5;
  // Number of performance counters / event selector registers.
  parameter int unsigned NUM_COUNTERS = 29;
  // Width of an estimate returned by a query (a 64-bit counter value).
  parameter int unsigned EST_W        = 64;
  // Width of one random word: wide enough to mask any X in 0..63.
  parameter int unsigned LFSR_W       = 64;
  // Fibonacci feedback taps x^64 + x^63 + x^61 + x^60 + 1 (a primitive
  // polynomial); bit i of the mask stands for tap position i+1.
  parameter logic [63:0] LFSR_TAPS    = 64'hD800_0000_0000_0000;

  // The monitored events, one bit each in the event vector.
  typedef enum logic [3:0] {
    EV_EXCEPTION   = 4'd0,
    EV_LOAD        = 4'd1,
    EV_STORE       = 4'd2,
    EV_SYSTEM      = 4'd3,
    EV_ARITH       = 4'd4,
    EV_BRANCH      = 4'd5,
    EV_JAL         = 4'd6,
    EV_JALR        = 4'd7,
    EV_BR_MISPRED  = 4'd8,
    EV_ICACHE_MISS = 4'd9,
    EV_DCACHE_MISS = 4'd10,
    EV_DCACHE_REL  = 4'd11
  } event_e;
  parameter int unsigned NUM_EVENTS = 12;

  // Seed of random source k: an odd constant times (k+1), never zero.
  function automatic logic [63:0] lfsr_seed(input int unsigned k);
    return 64'h9E37_79B9_7F4A_7C15 * 64'(k + 1);
  endfunction

endpackage
