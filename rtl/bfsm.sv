// bfsm: bitstream resolution finite state machine.
//
// Top-level controller of the entropy decoder.  It takes commands from the
// decoder's host and coordinates the other units:
//   CMD_SLICE  empties the bitstream buffer, runs the context
//              initialization module with the slice QP and init type, then
//              initialises the arithmetic decoding unit (range 510, 9-bit
//              offset) once the buffer holds enough bits;
//   CMD_TU     starts the bitstream resolution unit on one transform block
//              and waits for its done;
//   CMD_SAO    starts the SAO parameter sequencer on one CTB and waits
//              for its done;
//   CMD_MVD    starts the motion vector difference sequencer on one
//              mvd_coding and waits for its done;
//   CMD_INTRA  starts the intra prediction mode sequencer on one CU and
//              waits for its done;
//   CMD_PU     starts the prediction unit sequencer on one inter block and
//              waits for its done; the MVD sequencer it calls shares the
//              request path;
//   CMD_END    decodes end_of_slice_segment_flag as a terminate bin and
//              reports it on eos_valid/eos_flag.
// It also owns the request multiplexer in front of the arithmetic decoding
// unit: residual bins from the resolution unit while a block is parsed,
// SAO, MVD, intra-mode and PU bins from their sequencers, the terminate bin in CMD_END.
// cmd_ready is high in the idle state; a
// command is taken when cmd_valid && cmd_ready.  The command set is this
// design's own framing of the document's "determines which syntax
// elements exist ... and controls the coordination of other modules".
module bfsm
  import cabac_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       cmd_valid,
  input  cmd_e       cmd,
  output logic       cmd_ready,
  // buffer and context initialization
  output logic       bs_flush,
  output logic       init_start,
  input  logic       init_done,
  // arithmetic decoding unit control
  output logic       adu_init_req,
  input  logic       adu_init_done,
  // residual parser
  output logic       tu_start,
  input  logic       tu_done,
  input  logic       bsru_req_valid,
  input  bin_mode_e  bsru_req_mode,
  // SAO parameter sequencer
  output logic       sao_start,
  input  logic       sao_done,
  input  logic       sao_req_valid,
  input  bin_mode_e  sao_req_mode,
  // MVD sequencer
  output logic       mvd_start,
  input  logic       mvd_done,
  input  logic       mvd_req_valid,
  input  bin_mode_e  mvd_req_mode,
  // intra prediction mode sequencer
  output logic       intra_start,
  input  logic       intra_done,
  input  logic       intra_req_valid,
  input  bin_mode_e  intra_req_mode,
  // prediction unit sequencer (with the MVD sequencer it calls)
  output logic       pu_start,
  input  logic       pu_done,
  input  logic       pu_req_valid,
  input  bin_mode_e  pu_req_mode,
  // request multiplexer towards the arithmetic decoding unit
  output logic       adu_req_valid,
  output bin_mode_e  adu_req_mode,
  input  logic       adu_bin_valid,
  input  logic       adu_bin,
  // end of slice
  output logic       eos_valid,
  output logic       eos_flag
);
  typedef enum logic [3:0] {
    B_IDLE, B_CTXINIT, B_ADUINIT, B_TU, B_SAO, B_MVD, B_INTRA, B_PU, B_END
  } bstate_e;
  bstate_e st_q;

  assign cmd_ready    = (st_q == B_IDLE);
  assign bs_flush     = cmd_valid && cmd_ready && cmd == CMD_SLICE;
  assign init_start   = bs_flush;
  assign tu_start     = cmd_valid && cmd_ready && cmd == CMD_TU;
  assign adu_init_req = (st_q == B_ADUINIT);
  assign sao_start    = cmd_valid && cmd_ready && cmd == CMD_SAO;
  assign mvd_start    = cmd_valid && cmd_ready && cmd == CMD_MVD;
  assign intra_start  = cmd_valid && cmd_ready && cmd == CMD_INTRA;
  assign pu_start     = cmd_valid && cmd_ready && cmd == CMD_PU;
  assign adu_req_valid = (st_q == B_TU)  ? bsru_req_valid :
                         (st_q == B_SAO) ? sao_req_valid  :
                         (st_q == B_MVD) ? mvd_req_valid  :
                         (st_q == B_INTRA) ? intra_req_valid :
                         (st_q == B_PU) ? (pu_req_valid || mvd_req_valid) : (st_q == B_END);
  assign adu_req_mode  = (st_q == B_END) ? BIN_TERM :
                         (st_q == B_SAO) ? sao_req_mode :
                         (st_q == B_MVD) ? mvd_req_mode :
                         (st_q == B_INTRA) ? intra_req_mode :
                         (st_q == B_PU) ? (pu_req_valid ? pu_req_mode : mvd_req_mode) :
                         bsru_req_mode;
  assign eos_valid    = (st_q == B_END) && adu_bin_valid;
  assign eos_flag     = adu_bin;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q <= B_IDLE;
    end else begin
      unique case (st_q)
        B_IDLE: if (cmd_valid) begin
          unique case (cmd)
            CMD_SLICE: st_q <= B_CTXINIT;
            CMD_TU:    st_q <= B_TU;
            CMD_END:   st_q <= B_END;
            CMD_SAO:   st_q <= B_SAO;
            CMD_MVD:   st_q <= B_MVD;
            CMD_INTRA: st_q <= B_INTRA;
            CMD_PU:    st_q <= B_PU;
            default:   st_q <= B_IDLE;
          endcase
        end
        B_CTXINIT: if (init_done)     st_q <= B_ADUINIT;
        B_ADUINIT: if (adu_init_done) st_q <= B_IDLE;
        B_TU:      if (tu_done)       st_q <= B_IDLE;
        B_SAO:     if (sao_done)      st_q <= B_IDLE;
        B_MVD:     if (mvd_done)      st_q <= B_IDLE;
        B_INTRA:   if (intra_done)    st_q <= B_IDLE;
        B_PU:      if (pu_done)       st_q <= B_IDLE;
        B_END:     if (adu_bin_valid) st_q <= B_IDLE;
        default:   st_q <= B_IDLE;
      endcase
    end
  end
endmodule
