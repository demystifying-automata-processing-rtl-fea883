// nfa_fpga_top: one FPGA device of a logic-based NFA accelerator. It holds
// one NFA partition, replicated once per input stream, and reports matches
// through a pin-limited output port.
//
// Each of the NUM_STREAMS streams has its own symbol_decoder and its own
// copy of the one-hot nfa_engine (in a logic-based design, a second stream
// needs a second copy of the logic). All streams advance in lock step, one
// character each per clock: a character is consumed from every stream on
// each cycle where in_valid and in_ready are both high. The report vectors
// of all copies are concatenated (stream 0 in the low bits) and handed to
// one report_collector. After each window of N_INPUTS characters it sends
// the window's matches over OUT_PINS pins in ceil(NUM_STREAMS*N_REP/OUT_PINS)
// cycles, and input stalls for those cycles.
//
// With STRIDE > 1 every stream takes STRIDE characters per clock
// (in_char[s][0] is the earliest) and the NFA parameters describe a strided
// NFA over compound symbols (see symbol_decoder); N_INPUTS still counts
// characters and must be a multiple of STRIDE.
//
// Ports: in_char[s] holds the character(s) of stream s; in_sod marks the first
// character of new streams (all streams restart together); in_ready is the
// stall signal. out_valid/out_data/out_last carry the match slices, one per
// cycle, with no back-pressure. Every report element is one bit per stream
// in the order of the element numbers. rst_n is an active-low synchronous
// reset; after it the first character starts a new stream.
//
// The per-stream replication, the one-hot NFA, alphabet compression and the
// reporting window follow the document. The default NFA (see nfa_pkg), four
// streams, 32 output pins and a 64K-character window (the NIDS setting) are
// parameters; the pin count and the lock-step stream handling are this
// design's choices.
module nfa_fpga_top
  import nfa_pkg::*;
#(
  parameter int unsigned NUM_STREAMS = 4,
  parameter int unsigned N_INPUTS    = 65536,
  parameter int unsigned OUT_PINS    = 32,
  parameter int unsigned N_CLASSES   = ALPHABET,
  parameter logic [ALPHABET-1:0][7:0] CLASS_MAP = identity_class_map(),
  parameter int unsigned STRIDE      = 1,
  localparam int unsigned N_SYM      = N_CLASSES ** STRIDE,
  parameter int unsigned N_STE  = DEF_N_STE,
  parameter int unsigned N_CNT  = DEF_N_CNT,
  parameter int unsigned N_BOOL = DEF_N_BOOL,
  localparam int unsigned CW     = (N_CNT  == 0) ? 1 : N_CNT,
  localparam int unsigned BW     = (N_BOOL == 0) ? 1 : N_BOOL,
  localparam int unsigned N_ELEM = N_STE + CW + BW,
  parameter logic [N_STE-1:0][N_SYM-1:0]     STE_MASK   = def_ste_mask(),
  parameter logic [N_STE-1:0][N_ELEM-1:0]    STE_PRED   = def_ste_pred(),
  parameter logic [N_STE-1:0]                START_ALL  = DEF_START_ALL,
  parameter logic [N_STE-1:0]                START_SOD  = DEF_START_SOD,
  parameter logic [CW-1:0][N_ELEM-1:0]       CNT_EN     = DEF_CNT_EN,
  parameter logic [CW-1:0][N_ELEM-1:0]       CNT_RST    = DEF_CNT_RST,
  parameter logic [CW-1:0][CNT_WIDTH-1:0]    CNT_TARGET = CNT_WIDTH'(2),
  parameter logic [CW-1:0][1:0]              CNT_MODE   = CNT_LATCH,
  parameter logic [BW-1:0][N_ELEM-1:0]       BOOL_IN    = DEF_BOOL_IN,
  parameter logic [BW-1:0][1:0]              BOOL_FUNC  = BOOL_AND,
  parameter logic [N_ELEM-1:0]               REPORT     = DEF_REPORT,
  localparam int unsigned N_REP = $countones(REPORT),
  localparam int unsigned R_ALL = NUM_STREAMS * N_REP
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         in_valid,
  input  logic                         in_sod,
  input  char_t [NUM_STREAMS-1:0][STRIDE-1:0] in_char,
  output logic                         in_ready,
  output logic                         out_valid,
  output logic [OUT_PINS-1:0]          out_data,
  output logic                         out_last
);

  logic                        adv;
  logic [NUM_STREAMS-1:0][N_REP-1:0] rep;

  assign adv = in_valid && in_ready;

  for (genvar s = 0; s < NUM_STREAMS; s++) begin : g_stream
    logic [N_SYM-1:0] sym;

    symbol_decoder #(
      .N_CLASSES (N_CLASSES),
      .CLASS_MAP (CLASS_MAP),
      .STRIDE    (STRIDE)
    ) u_dec (
      .ch  (in_char[s]),
      .sym (sym)
    );

    nfa_engine #(
      .N_STE      (N_STE),
      .N_SYM      (N_SYM),
      .N_CNT      (N_CNT),
      .N_BOOL     (N_BOOL),
      .STE_MASK   (STE_MASK),
      .STE_PRED   (STE_PRED),
      .START_ALL  (START_ALL),
      .START_SOD  (START_SOD),
      .CNT_EN     (CNT_EN),
      .CNT_RST    (CNT_RST),
      .CNT_TARGET (CNT_TARGET),
      .CNT_MODE   (CNT_MODE),
      .BOOL_IN    (BOOL_IN),
      .BOOL_FUNC  (BOOL_FUNC),
      .REPORT     (REPORT)
    ) u_nfa (
      .clk    (clk),
      .rst_n  (rst_n),
      .adv    (adv),
      .sod    (in_sod),
      .sym    (sym),
      .act    (),
      .report (rep[s])
    );
  end

  report_collector #(
    .N_REP    (R_ALL),
    .N_INPUTS (N_INPUTS / STRIDE),
    .OUT_PINS (OUT_PINS)
  ) u_report (
    .clk       (clk),
    .rst_n     (rst_n),
    .adv       (adv),
    .report    (rep),
    .in_ready  (in_ready),
    .out_valid (out_valid),
    .out_data  (out_data),
    .out_last  (out_last)
  );

endmodule
