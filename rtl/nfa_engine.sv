// nfa_engine: one NFA partition in one-hot encoding, consuming one input
// symbol per clock cycle whatever the number of active states.
//
// Every state (STE, state transition element) is one flip-flop. A state
// carries its own symbol set STE_MASK (a row of N_SYM bits over the decoded
// symbol classes), and it becomes active after a symbol when
//   (it is a start state, or one of its predecessors STE_PRED is active)
//   AND the symbol is in its set.
// So a transition is an AND of a state output with the decoded character,
// and a state's fan-in is an OR over its predecessors. Counter and boolean
// elements (counter_element, boolean_element) sit between the states: their
// outputs can be predecessors of states and can be reported.
//
// Element numbering: see nfa_pkg. STE_PRED, CNT_EN, CNT_RST and REPORT are
// masks over all N_ELEM element slots. Boolean elements take their inputs
// from states only (BOOL_IN bits above N_STE are ignored) and counters from
// states and booleans (their counter bits are ignored); this keeps every
// path from a flip-flop to a flip-flop free of loops.
//
// Start states: START_ALL states may begin a match at every symbol;
// START_SOD states only at the first symbol of a stream. A symbol marked sod
// (start of data), and the first symbol after reset, begin a new stream: the
// predecessor activations of the previous stream are ignored and all
// counters restart.
//
// Interface and timing: sym is the decoded symbol, valid when adv is high;
// the state flip-flops update on that clock edge. act (all element
// activations) and report (activations of the report elements, packed in
// element order) describe the last consumed symbol and stay valid until the
// next adv. rst_n is an active-low synchronous reset.
//
// The one-hot scheme, symbol sets on states and the counter and boolean
// extension follow the document; start-state kinds, stream restart and the
// mask form of the parameters are this design's choices.
module nfa_engine
  import nfa_pkg::*;
#(
  parameter int unsigned N_STE  = DEF_N_STE,
  parameter int unsigned N_SYM  = ALPHABET,
  parameter int unsigned N_CNT  = DEF_N_CNT,
  parameter int unsigned N_BOOL = DEF_N_BOOL,
  localparam int unsigned CW     = (N_CNT  == 0) ? 1 : N_CNT,
  localparam int unsigned BW     = (N_BOOL == 0) ? 1 : N_BOOL,
  localparam int unsigned N_ELEM = N_STE + CW + BW,
  parameter logic [N_STE-1:0][N_SYM-1:0]    STE_MASK   = def_ste_mask(),
  parameter logic [N_STE-1:0][N_ELEM-1:0]   STE_PRED   = def_ste_pred(),
  parameter logic [N_STE-1:0]               START_ALL  = DEF_START_ALL,
  parameter logic [N_STE-1:0]               START_SOD  = DEF_START_SOD,
  parameter logic [CW-1:0][N_ELEM-1:0]      CNT_EN     = DEF_CNT_EN,
  parameter logic [CW-1:0][N_ELEM-1:0]      CNT_RST    = DEF_CNT_RST,
  parameter logic [CW-1:0][CNT_WIDTH-1:0]   CNT_TARGET = CNT_WIDTH'(2),
  parameter logic [CW-1:0][1:0]             CNT_MODE   = CNT_LATCH,
  parameter logic [BW-1:0][N_ELEM-1:0]      BOOL_IN    = DEF_BOOL_IN,
  parameter logic [BW-1:0][1:0]             BOOL_FUNC  = BOOL_AND,
  parameter logic [N_ELEM-1:0]              REPORT     = DEF_REPORT,
  localparam int unsigned N_REP = $countones(REPORT)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               adv,
  input  logic               sod,
  input  logic [N_SYM-1:0]   sym,
  output logic [N_ELEM-1:0]  act,
  output logic [N_REP-1:0]   report
);

  // position of element j among the report elements
  function automatic int unsigned rep_rank(input int unsigned j);
    int unsigned r;
    r = 0;
    for (int unsigned i = 0; i < j; i++) if (REPORT[i]) r++;
    return r;
  endfunction

  logic [N_STE-1:0] ste_q, ste_d;
  logic [CW-1:0]    cnt_fire;
  logic [BW-1:0]    bool_out;
  logic             first_q;     // no symbol consumed since reset
  logic             new_stream;

  assign new_stream = sod || first_q;
  assign act        = {bool_out, cnt_fire, ste_q};

  // ---------------- boolean elements: inputs from states only -------------
  for (genvar b = 0; b < BW; b++) begin : g_bool
    if (b < N_BOOL) begin : g_on
      boolean_element #(
        .N_IN (N_STE),
        .SEL  (BOOL_IN[b][N_STE-1:0]),
        .FUNC (BOOL_FUNC[b])
      ) u_bool (
        .in  (ste_q),
        .out (bool_out[b])
      );
    end else begin : g_off
      assign bool_out[b] = 1'b0;
    end
  end

  // ---------------- counters: inputs from states and booleans -------------
  for (genvar c = 0; c < CW; c++) begin : g_cnt
    if (c < N_CNT) begin : g_on
      logic [N_STE+BW-1:0] cnt_src;
      assign cnt_src = {bool_out, ste_q};
      localparam logic [N_STE+BW-1:0] EN_SEL  =
          {CNT_EN[c][N_ELEM-1 -: BW], CNT_EN[c][N_STE-1:0]};
      localparam logic [N_STE+BW-1:0] RST_SEL =
          {CNT_RST[c][N_ELEM-1 -: BW], CNT_RST[c][N_STE-1:0]};
      counter_element #(
        .WIDTH  (CNT_WIDTH),
        .TARGET (CNT_TARGET[c]),
        .MODE   (CNT_MODE[c])
      ) u_cnt (
        .clk    (clk),
        .rst_n  (rst_n),
        .adv    (adv),
        .clear  (new_stream),
        .cnt_in (|(cnt_src & EN_SEL)),
        .rst_in (|(cnt_src & RST_SEL)),
        .fire   (cnt_fire[c])
      );
    end else begin : g_off
      assign cnt_fire[c] = 1'b0;
    end
  end

  // ---------------- states: one flip-flop each ----------------------------
  always_comb begin
    for (int j = 0; j < N_STE; j++) begin
      logic enabled;
      enabled = START_ALL[j]
             || (new_stream  && START_SOD[j])
             || (!new_stream && |(STE_PRED[j] & act));
      ste_d[j] = enabled && |(STE_MASK[j] & sym);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ste_q   <= '0;
      first_q <= 1'b1;
    end else if (adv) begin
      ste_q   <= ste_d;
      first_q <= 1'b0;
    end
  end

  // ---------------- report vector, packed in element order ----------------
  for (genvar j = 0; j < N_ELEM; j++) begin : g_rep
    if (REPORT[j]) begin : g_on
      assign report[rep_rank(j)] = act[j];
    end
  end

endmodule
