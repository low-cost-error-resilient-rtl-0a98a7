// seu_resilient_top: the SEU resilient control circuits side by side.
//
// Three independent control paths share only the clock and reset:
//   - fsm_h2: an eight-state sequencer with an H-2 (binary + parity) state
//     register; a single upset is detected and sends it to idle S0.
//   - fsm_h3: the same sequencer with an H-3 state register; a single upset
//     is absorbed and the sequence completes normally.
//   - serializer: a DATA_W:1 serializer driven by the self-correcting index
//     counter (DMR ring counter for the low bits, DMR Gray counter for the
//     high bits), which corrects a single upset on the next clock edge.
// Every seu_flip_* input inverts the matching register bits as they are
// loaded; they exist to inject upsets in simulation and are tied to zero in
// a real design.
// Timing: all registers use clk; rst_n is asynchronous, active low.
module seu_resilient_top
  import seu_pkg::*;
#(
  parameter int unsigned DATA_W = 256,
  parameter int unsigned RING_N = 4,
  localparam int unsigned POS_W = (RING_N > 1) ? $clog2(RING_N) : 1,
  localparam int unsigned IDX_W = $clog2(DATA_W),
  localparam int unsigned GC_W  = IDX_W - POS_W
) (
  input  logic              clk,
  input  logic              rst_n,
  // H-2 state machine
  input  logic              h2_start,
  input  logic              h2_step,
  input  logic [H2_W-1:0]   h2_seu_flip,
  output state_e            h2_state,
  output logic              h2_busy,
  output logic              h2_done,
  output logic              h2_seu_detected,
  output h2_code_t          h2_code,
  // H-3 state machine
  input  logic              h3_start,
  input  logic              h3_step,
  input  logic [H3_W-1:0]   h3_seu_flip,
  output state_e            h3_state,
  output logic              h3_busy,
  output logic              h3_done,
  output logic              h3_seu_corrected,
  output logic              h3_seu_illegal,
  output h3_code_t          h3_code,
  // serializer with its index counter
  input  logic [DATA_W-1:0] ser_pdata,
  input  logic [RING_N-1:0] ser_seu_flip_ring_a,
  input  logic [RING_N-1:0] ser_seu_flip_ring_b,
  input  logic [GC_W-1:0]   ser_seu_flip_gc1,
  input  logic [GC_W-1:0]   ser_seu_flip_gc2,
  input  logic [1:0]        ser_seu_flip_p,
  output logic              ser_load,
  output logic              ser_sout,
  output logic [IDX_W-1:0]  ser_index,
  output logic [3:0]        ser_err
);

  fsm_h2 u_fsm_h2 (
    .clk          (clk),
    .rst_n        (rst_n),
    .start        (h2_start),
    .step         (h2_step),
    .seu_flip     (h2_seu_flip),
    .state        (h2_state),
    .busy         (h2_busy),
    .done         (h2_done),
    .seu_detected (h2_seu_detected),
    .code         (h2_code)
  );

  fsm_h3 u_fsm_h3 (
    .clk           (clk),
    .rst_n         (rst_n),
    .start         (h3_start),
    .step          (h3_step),
    .seu_flip      (h3_seu_flip),
    .state         (h3_state),
    .busy          (h3_busy),
    .done          (h3_done),
    .seu_corrected (h3_seu_corrected),
    .seu_illegal   (h3_seu_illegal),
    .code          (h3_code)
  );

  serializer #(.DATA_W(DATA_W), .RING_N(RING_N)) u_ser (
    .clk             (clk),
    .rst_n           (rst_n),
    .pdata           (ser_pdata),
    .seu_flip_ring_a (ser_seu_flip_ring_a),
    .seu_flip_ring_b (ser_seu_flip_ring_b),
    .seu_flip_gc1    (ser_seu_flip_gc1),
    .seu_flip_gc2    (ser_seu_flip_gc2),
    .seu_flip_p      (ser_seu_flip_p),
    .load            (ser_load),
    .sout            (ser_sout),
    .index           (ser_index),
    .err             (ser_err)
  );

endmodule
