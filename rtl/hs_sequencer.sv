// hs_sequencer: the SMP-11 handshake sequencer (upper control level).
//
// A 16-word control store holds every task sequence of the instruction set,
// overlapped so that sequences share their tails: instruction fetch (IF1,
// IF2), then the pre-op (SRC, DST or SPECIAL), OP and POST-OP tasks and the
// service sequence. Each word enables one segment controller (the MACU or the
// ACU), tells the MACU which start address to load, selects which "finished"
// line steps the sequencer, and selects the next address: the address plus
// one, the start of the sequence chosen by the instruction decoder (hardwired
// DOP or SOP sequence, or the decoder's SPECIAL address), or, at the end of an
// instruction, the service sequence if an interrupt or trap is pending and
// the instruction fetch otherwise. The sequence layout and word fields follow
// the document's handshake table and figure; the bit encoding is this
// design's own, and since the machine is not pipelined exactly one controller
// is enabled at a time.
//
// Timing: the store is read combinationally from the address latch, so the
// enabled controller works in the same cycle. The latch steps at the rising
// clock edge when ce is high and the selected finished line is high, with no
// idle cycle between tasks. in_service is high while a service sequence
// entered from an end of instruction runs. After reset the sequencer starts
// in the service sequence (in_service set), which the MACU turns into the
// power-up load of PC and PSW.
module hs_sequencer (
  input  logic                clk,
  input  logic                rst,
  input  logic                ce,
  input  smp11_pkg::hs_sel_e  hs_sel,
  input  logic [3:0]          hs_spe,
  input  logic                service_req,
  input  logic                acu_fin,
  input  logic                macu_fin,
  output smp11_pkg::hs_word_t word,
  output logic [3:0]          addr,
  output logic                in_service,
  output logic                step,         // sequencer advances this cycle
  output logic                dispatch,     // taking the decoder's start address
  output logic                take_service  // end of instruction, entering service
);
  import smp11_pkg::*;

  function automatic hs_word_t hw(logic m, nas_e nas, sas_e sas);
    hs_word_t w;
    w.fsel_macu = m;
    w.nas       = nas;
    w.macu_en   = m;
    w.macs_ld   = m;
    w.sas       = sas;
    return w;
  endfunction

  always_comb begin
    unique case (addr)
      4'd0:  word = hw(1'b1, NAS_INC,  SAS_IF1);   // IF 1
      4'd1:  word = hw(1'b1, NAS_EXT,  SAS_IF2);   // IF 2, decode
      4'd2:  word = hw(1'b1, NAS_INC,  SAS_SRC);   // SRC
      4'd3:  word = hw(1'b1, NAS_INC,  SAS_DST);   // DST
      4'd4:  word = hw(1'b0, NAS_INC,  SAS_IF1);   // OP
      4'd5:  word = hw(1'b1, NAS_ENDI, SAS_POST);  // POST-OP
      4'd6:  word = hw(1'b0, NAS_ENDI, SAS_IF1);   // OP only
      4'd7:  word = hw(1'b1, NAS_INC,  SAS_SPE);   // SPE
      4'd8:  word = hw(1'b1, NAS_INC,  SAS_DST);   // DST
      4'd9:  word = hw(1'b0, NAS_INC,  SAS_IF1);   // OP
      4'd10: word = hw(1'b1, NAS_ENDI, SAS_POST);  // POST-OP
      4'd11: word = hw(1'b1, NAS_INC,  SAS_SPE);   // SPE
      4'd12: word = hw(1'b1, NAS_INC,  SAS_DST);   // DST
      4'd13: word = hw(1'b1, NAS_ENDI, SAS_POST);  // POST-OP
      4'd14: word = hw(1'b1, NAS_INC,  SAS_SPE);   // SPE / service
      4'd15: word = hw(1'b0, NAS_ENDI, SAS_IF1);   // OP / service (PSW load)
    endcase
  end

  logic [3:0] ext, nxt;
  always_comb begin
    unique case (hs_sel)
      HSS_DOP: ext = HS_DOP;
      HSS_SOP: ext = HS_SOP;
      default: ext = hs_spe;
    endcase
    unique case (word.nas)
      NAS_EXT:  nxt = ext;
      NAS_ENDI: nxt = service_req ? HS_SER : HS_IF;
      default:  nxt = addr + 4'd1;
    endcase
  end

  assign step         = ce && (word.fsel_macu ? macu_fin : acu_fin);
  assign dispatch     = step && (word.nas == NAS_EXT);
  assign take_service = step && (word.nas == NAS_ENDI) && service_req;

  always_ff @(posedge clk) begin
    if (rst) begin
      addr       <= HS_SER;   // power-up: load PC and PSW from a vector
      in_service <= 1'b1;
    end else if (step) begin
      addr <= nxt;
      if (word.nas == NAS_ENDI) in_service <= service_req;
    end
  end
endmodule
