// smp11_pkg: types and constants shared by the SMP-11 processor.
//
// The SMP-11 executes the PDP-11 basic instruction set with a segmented
// microprogrammed control unit: a handshake sequencer (HS) steps through task
// sequences and enables either the arithmetic control unit (ACU) or the memory
// access control unit (MACU); both drive one 16-bit Am2901-style register/ALU.
// This package holds the 2901 instruction codes, the microword layouts of the
// three control stores and the selector encodings of the data path.
//
// The 2901 field encodings are those of the standard Am2901 part. The field
// groupings of the microwords follow the document's figures; the exact bit
// assignments, widths and encodings below are this design's own.
package smp11_pkg;

  // ---------------------------------------------------------------- 2901 codes
  // Source operand control (I2..I0): R/S operand pairs.
  typedef enum logic [2:0] {
    SRC_AQ = 3'd0, SRC_AB = 3'd1, SRC_ZQ = 3'd2, SRC_ZB = 3'd3,
    SRC_ZA = 3'd4, SRC_DA = 3'd5, SRC_DQ = 3'd6, SRC_DZ = 3'd7
  } alu_src_e;

  // ALU function control (I5..I3): three arithmetic, five logical.
  typedef enum logic [2:0] {
    FN_ADD = 3'd0, FN_SUBR = 3'd1, FN_SUBS = 3'd2, FN_OR = 3'd3,
    FN_AND = 3'd4, FN_NOTRS = 3'd5, FN_EXOR = 3'd6, FN_EXNOR = 3'd7
  } alu_fn_e;

  // Destination control (I8..I6): RAM/Q load, shift direction and Y source.
  typedef enum logic [2:0] {
    DST_QREG = 3'd0, DST_NOP = 3'd1, DST_RAMA = 3'd2, DST_RAMF = 3'd3,
    DST_RAMQD = 3'd4, DST_RAMD = 3'd5, DST_RAMQU = 3'd6, DST_RAMU = 3'd7
  } alu_dst_e;

  // Nine-line 2901 microinstruction, bit 8 down to bit 0.
  typedef struct packed {
    alu_dst_e dst;
    alu_fn_e  fn;
    alu_src_e src;
  } ralu_i_t;

  // Byte-op "no operation" for the upper byte slices: F = B written back to B.
  localparam ralu_i_t RALU_HOLD = '{dst: DST_RAMF, fn: FN_OR, src: SRC_ZB};

  // External shift-link input for the end of the word (or low byte) that a
  // shift leaves open: 0, the carry flag, or the sign bit (arithmetic right).
  typedef enum logic [1:0] {SHIN_ZERO = 2'd0, SHIN_CARRY = 2'd1, SHIN_SIGN = 2'd2} shin_e;

  // Carry-in selection of the ACU.
  typedef enum logic [1:0] {CN_ZERO = 2'd0, CN_ONE = 2'd1, CN_C = 2'd2, CN_NOTC = 2'd3} cn_sel_e;

  // Status outputs of the 16-bit RALU used by the PSW logic.
  typedef struct packed {
    logic c16, c8;      // carry out of bit 15 / bit 7
    logic ovr16, ovr8;  // two's complement overflow, word / byte
    logic f15, f7;      // sign of the ALU result, word / byte
    logic zhi, zlo;     // F = 0 for the high / low byte
    logic shout;        // bit shifted out by a RAM shift
  } ralu_flags_t;

  // ---------------------------------------------------------------- D bus mux
  typedef enum logic [3:0] {
    DM_ZERO    = 4'd0,   // constant 0
    DM_BDR     = 4'd1,   // bus data in (byte swapped for an odd byte address)
    DM_Y       = 4'd2,   // 2901 Y bus
    DM_YSWAP   = 4'd3,   // Y bus, bytes swapped (SWAB)
    DM_YSEXT   = 4'd4,   // low byte of Y, sign extended
    DM_PSW     = 4'd5,   // processor status word
    DM_BROFS   = 4'd6,   // 2 x signed IR<7:0>, or 0 if the branch is false
    DM_IROFS6  = 4'd7,   // 2 x IR<5:0> (SOB, MARK)
    DM_CINC    = 4'd8,   // address step: 1 for byte operands, else 2
    DM_C2      = 4'd9,   // constant 2
    DM_TVEC    = 4'd10,  // trap / interrupt vector address
    DM_NFILL   = 4'd11,  // sixteen copies of the N flag (SXT)
    DM_YOUT    = 4'd12   // Y bus to memory (byte swapped for an odd byte address)
  } dsel_e;

  // ------------------------------------------------------------- PSW control
  // Source of each condition code: previous value, generated logic value,
  // instruction register (set/clear CC ops) or data bus.
  typedef enum logic [1:0] {FS_P = 2'd0, FS_L = 2'd1, FS_I = 2'd2, FS_D = 2'd3} flag_sel_e;
  typedef enum logic [1:0] {VG_ZERO = 2'd0, VG_NXC = 2'd1, VG_OVR = 2'd2} vgen_e;
  typedef enum logic [1:0] {CG_ZERO = 2'd0, CG_ONE = 2'd1, CG_CARRY = 2'd2, CG_SHIFT = 2'd3} cgen_e;

  typedef struct packed {
    flag_sel_e nsel, zsel, vsel, csel;
    vgen_e     vgen;
    cgen_e     cgen;
    logic      cinv;    // carry is a borrow (subtract-type operation)
    logic      swab;    // N and Z from the low byte whatever the width
    logic      ld_t;    // load T from the data bus
    logic      ld_pri;  // load priority from the data bus
  } psw_ctl_t;

  localparam psw_ctl_t PSW_HOLD = '{nsel: FS_P, zsel: FS_P, vsel: FS_P, csel: FS_P,
                                    vgen: VG_ZERO, cgen: CG_ZERO, cinv: 1'b0,
                                    swab: 1'b0, ld_t: 1'b0, ld_pri: 1'b0};

  // --------------------------------------------------------------- ACS word
  typedef struct packed {
    ralu_i_t  i;
    cn_sel_e  cn;
    shin_e    shin;
    dsel_e    dsel;
    psw_ctl_t psw;
    logic     fin;     // ACU finished: set in every word (single-cycle ops)
  } acs_word_t;

  localparam int ACS_AW = 5;   // 32 words

  // ACS addresses that are not taken straight from the instruction register.
  localparam logic [ACS_AW-1:0] ACS_LDPSW = 5'd0;   // PSW from data bus (RTI/RTT)
  localparam logic [ACS_AW-1:0] ACS_CCOP  = 5'd2;   // set / clear condition codes
  localparam logic [ACS_AW-1:0] ACS_TRAP  = 5'd4;   // PSW from data bus (traps)
  localparam logic [ACS_AW-1:0] ACS_MFPS  = 5'd22;

  // -------------------------------------------------------------- MACS word
  // 2901 register port selection: hardwired PC, SP, R5, the register field of
  // the instruction, the operand buffer of the current task, or one of the
  // buffers held in the upper eight 2901 registers.
  typedef enum logic [2:0] {
    RS_PC = 3'd0, RS_SP = 3'd1, RS_R5 = 3'd2, RS_REG = 3'd3,
    RS_BUF = 3'd4, RS_SB = 3'd5, RS_DB = 3'd6, RS_TB = 3'd7
  } reg_sel_e;

  localparam logic [3:0] RA_PC = 4'd7, RA_SP = 4'd6, RA_R5 = 4'd5;
  localparam logic [3:0] RA_SB = 4'd13;  // source operand buffer
  localparam logic [3:0] RA_DB = 4'd14;  // destination operand / result buffer
  localparam logic [3:0] RA_TB = 4'd15;  // temporary (vector address)

  typedef enum logic [1:0] {
    BUS_NONE = 2'd0, BUS_READ = 2'd1, BUS_WRITE = 2'd2, BUS_WRITE_OP = 2'd3
  } bus_op_e;  // BUS_WRITE_OP: byte write if the instruction is a byte op

  typedef enum logic [2:0] {
    MI_NONE = 3'd0, MI_CONS_DATA = 3'd1, MI_HALT = 3'd2, MI_WAIT = 3'd3,
    MI_RESET = 3'd4
  } misc_e;

  typedef struct packed {
    ralu_i_t  i;
    logic     cn;
    reg_sel_e asel;
    reg_sel_e bsel;
    logic     rsrc;    // register field = source field regardless of task
    dsel_e    dsel;
    logic     ld_bar;
    logic     ld_bdr;  // bus data out register from the D bus
    logic     ld_ir;   // instruction register from the bus (fetch)
    bus_op_e  bus;
    logic     skz;     // skip one word if the ALU result is zero
    misc_e    misc;
    logic     fin;     // MACU finished
  } macs_word_t;

  localparam int MACS_AW = 7;  // two banks of 64 words

  // MACS routine start addresses (lower bank: fetch and addressing modes).
  localparam logic [MACS_AW-1:0] MA_IF1     = 7'd0;
  localparam logic [MACS_AW-1:0] MA_IF2     = 7'd1;
  localparam logic [MACS_AW-1:0] MA_MODE0   = 7'd2;
  localparam logic [MACS_AW-1:0] MA_MODE1   = 7'd3;
  localparam logic [MACS_AW-1:0] MA_MODE2   = 7'd5;
  localparam logic [MACS_AW-1:0] MA_MODE3   = 7'd7;
  localparam logic [MACS_AW-1:0] MA_MODE4   = 7'd10;
  localparam logic [MACS_AW-1:0] MA_MODE5   = 7'd12;
  localparam logic [MACS_AW-1:0] MA_MODE6   = 7'd15;
  localparam logic [MACS_AW-1:0] MA_MODE7   = 7'd18;
  localparam logic [MACS_AW-1:0] MA_MV0     = 7'd22;
  localparam logic [MACS_AW-1:0] MA_MV1     = 7'd23;
  localparam logic [MACS_AW-1:0] MA_MV2     = 7'd24;
  localparam logic [MACS_AW-1:0] MA_MV3     = 7'd25;
  localparam logic [MACS_AW-1:0] MA_MV4     = 7'd27;
  localparam logic [MACS_AW-1:0] MA_MV5     = 7'd28;
  localparam logic [MACS_AW-1:0] MA_MV6     = 7'd30;
  localparam logic [MACS_AW-1:0] MA_MV7     = 7'd32;
  localparam logic [MACS_AW-1:0] MA_JA2     = 7'd35;
  localparam logic [MACS_AW-1:0] MA_JA4     = 7'd37;
  // Upper bank: operand storage, special instructions and service.
  localparam logic [MACS_AW-1:0] MA_ST_REG  = 7'd64;
  localparam logic [MACS_AW-1:0] MA_ST_SEXT = 7'd65;
  localparam logic [MACS_AW-1:0] MA_ST_MEM  = 7'd66;
  localparam logic [MACS_AW-1:0] MA_NOSTORE = 7'd67;
  localparam logic [MACS_AW-1:0] MA_BR      = 7'd68;
  localparam logic [MACS_AW-1:0] MA_SOB     = 7'd69;
  localparam logic [MACS_AW-1:0] MA_JMP     = 7'd72;
  localparam logic [MACS_AW-1:0] MA_JSR     = 7'd73;
  localparam logic [MACS_AW-1:0] MA_RTS     = 7'd77;
  localparam logic [MACS_AW-1:0] MA_MARK    = 7'd80;
  localparam logic [MACS_AW-1:0] MA_RTI     = 7'd84;
  localparam logic [MACS_AW-1:0] MA_SER     = 7'd88;
  localparam logic [MACS_AW-1:0] MA_PWRUP   = 7'd92;  // tail of MA_SER: load PC, PSW from vector
  localparam logic [MACS_AW-1:0] MA_HALT    = 7'd96;
  localparam logic [MACS_AW-1:0] MA_WAIT    = 7'd98;
  localparam logic [MACS_AW-1:0] MA_RESET   = 7'd99;

  // ---------------------------------------------------------------- HS word
  // MACS start address select issued by the handshake sequencer.
  typedef enum logic [2:0] {
    SAS_IF1 = 3'd0, SAS_IF2 = 3'd1, SAS_SRC = 3'd2, SAS_DST = 3'd3,
    SAS_SPE = 3'd4, SAS_POST = 3'd5
  } sas_e;

  // Next HS address: increment, instruction decoder (external), or end of
  // instruction (service routine if requested, else instruction fetch).
  typedef enum logic [1:0] {NAS_INC = 2'd0, NAS_EXT = 2'd1, NAS_ENDI = 2'd2} nas_e;

  typedef struct packed {
    logic fsel_macu;  // finished line that steps the sequencer: 1 MACU, 0 ACU
    nas_e nas;
    logic macu_en;    // 1: enable the MACU, 0: enable the ACU
    logic macs_ld;    // load the MACS address register from the start mux
    sas_e sas;
  } hs_word_t;

  localparam logic [3:0] HS_IF   = 4'd0;
  localparam logic [3:0] HS_DOP  = 4'd2;   // SRC, DST, OP, POST
  localparam logic [3:0] HS_SOP  = 4'd3;   // DST, OP, POST
  localparam logic [3:0] HS_OPO  = 4'd6;   // OP only
  localparam logic [3:0] HS_DPO  = 4'd12;  // DST, POST
  localparam logic [3:0] HS_POST = 4'd13;  // POST only
  localparam logic [3:0] HS_SER  = 4'd14;  // SPE (service), OP (PSW load)

  // Handshake start-address select from the decoder.
  typedef enum logic [1:0] {HSS_DOP = 2'd0, HSS_SOP = 2'd1, HSS_SPE = 2'd2} hs_sel_e;

  // ------------------------------------------------------------ trap sources
  typedef enum logic [2:0] {
    TRAP_NONE = 3'd0, TRAP_EMT = 3'd1, TRAP_TRAP = 3'd2, TRAP_BPT = 3'd3,
    TRAP_IOT = 3'd4, TRAP_RSVD = 3'd5
  } trap_e;

  // Decoded instruction: everything the controllers take from the IR.
  typedef struct packed {
    hs_sel_e               hs_sel;
    logic [3:0]            hs_spe;
    logic [MACS_AW-1:0]    src_start;
    logic [MACS_AW-1:0]    dst_start;
    logic [MACS_AW-1:0]    spe_start;
    logic [MACS_AW-1:0]    post_start;
    logic [ACS_AW-1:0]     acs_addr;
    logic                  byte_op;
    logic                  op_a_dst;  // ACU A port = destination buffer
    logic [2:0]            src_reg;
    logic [2:0]            dst_reg;
    trap_e                 trap;
  } dec_t;

endpackage
