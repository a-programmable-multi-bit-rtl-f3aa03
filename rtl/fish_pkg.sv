// fish_pkg: types and constants shared by the FISH fault injector.
//
// FISH injects single- and multi-bit upsets onto the nets of a target circuit.
// A server (fi_server) fills a serial chain of fault injection elements with a
// pseudo-random pattern produced by four 8-bit programmable LFSRs, then raises
// FI Enable so that every net whose element holds a 1 is inverted. This package
// holds the configuration the user gives the server, the status it returns,
// and the enums for its phases and for the fault classes it reports.
//
// The LFSR width (8), the number of LFSRs (4, giving a 32-bit word), the chain
// length (8 elements) and the 10-clock initialisation follow the source
// description; the field widths and the encodings are this design's choice.
package fish_pkg;

  localparam int unsigned LFSR_W      = 8;   // stages s0..s7 of one LFSR
  localparam int unsigned N_LFSR      = 4;   // four LFSRs in parallel
  localparam int unsigned WORD_W      = LFSR_W * N_LFSR; // 32-bit random word
  localparam int unsigned CHAIN_LEN   = 8;   // FI elements per chain
  localparam int unsigned INIT_CYCLES = 10;  // initialisation delay in clocks
  localparam int unsigned SEL_W       = 3;   // FE Chain Select width (up to 8 chains)
  localparam int unsigned LIMIT_W     = 4;   // upset limit field width

  // Controller phases, in the order one injection passes through them.
  typedef enum logic [2:0] {
    PH_IDLE     = 3'd0,
    PH_INIT     = 3'd1,  // LFSR seed load or advance, word capture, arm
    PH_WRITE    = 3'd2,  // fault sequence shifted into the selected chain
    PH_INJECT   = 3'd3,  // FI Enable high: marked nets are inverted
    PH_READBACK = 3'd4,  // chain shifted into the SIPO, chain cleared
    PH_CLASSIFY = 3'd5   // ones of the read-back counted
  } phase_e;

  // Fault classes derived from the number of ones read back.
  typedef enum logic [1:0] {
    FC_NONE = 2'd0,  // no bit upset
    FC_SBU  = 2'd1,  // single-bit upset
    FC_MBU  = 2'd2   // multiple-bit upset
  } fault_class_e;

  typedef struct packed {
    logic [N_LFSR-1:0][7:1]        taps;          // r7..r1 of each LFSR (Table-1 style)
    logic [N_LFSR-1:0][LFSR_W-1:0] seeds;         // seed of each LFSR
    logic                          reseed;        // 1: load seeds during INIT, 0: advance 8 steps
    logic [LIMIT_W-1:0]            upset_limit;   // at most this many ones in the sequence
    logic [1:0]                    lane;          // which LFSR byte of the word is sent
    logic [SEL_W-1:0]              chain_sel;     // target chain
    logic [7:0]                    inject_cycles; // clocks FI Enable stays high (0 counts as 1)
  } fsi_cfg_t;

  typedef struct packed {
    phase_e                        phase;
    logic                          busy;
    logic                          done;          // one-clock pulse after CLASSIFY
    logic [CHAIN_LEN-1:0]          readback;      // sequence read back through the SIPO
    logic [$clog2(CHAIN_LEN+1)-1:0] ones;         // number of ones in readback
    fault_class_e                  fclass;
    logic [WORD_W-1:0]             word;          // 32-bit word captured in INIT
    logic [15:0]                   n_injections;  // completed injections
    logic [15:0]                   n_mbu;         // of which multi-bit
  } fsi_status_t;

endpackage
