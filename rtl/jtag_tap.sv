// jtag_tap: IEEE 1149.1 test access port of the TDC.
//
// TAP controller: the standard 16-state machine on TMS, clocked by TCK,
// reset by TRST_N or five TMS-high clocks. Instruction register: 4 bits as in
// the document, plus a parity bit shifted in after them (even parity over
// all five); on a parity mismatch jtag_error is raised and the instruction
// becomes BYPASS. The document states the parity check; its bit position is
// own choice. Data registers, LSB shifted first, TDO changing on the falling
// edge of TCK:
//   0001 IDCODE    32-bit identification code (IDCODE parameter, own value)
//   0010 SAMPLE    captures the chip inputs listed in bsr_in (hit inputs and
//                  control pins in the top level)
//   1000 CONTROL   reads / writes all 16 control registers (192 bits);
//                  Update-DR writes them through a synchronised load pulse
//   1001 ASD       passes the chain through to the ASD chips: TDI goes to
//                  asd_tdi, asd_shift/asd_update follow Shift-DR/Update-DR,
//                  and asd_tdo returns through one register of this chip, so
//                  the chain is one bit longer than the ASD's (as the document
//                  reports for the second chip version)
//   1010 STATUS    captures the 6 status registers (72 bits)
//   1101 GPO       12-bit general purpose output register
//   1111 BYPASS    1-bit bypass; also every code not listed here
// EXTEST, INTEST, CORETEST and BIST (codes 0000, 0011, 1011, 1100) need the
// pad boundary cells, the internal scan registers and the memory self-test
// logic, which are not part of this design; they select BYPASS here.
module jtag_tap #(
  parameter logic [31:0] IDCODE  = 32'h0A3D_2001,  // own value, LSB = 1
  parameter int          NCTRLB  = 192,
  parameter int          NSTATB  = 72,
  parameter int          NBSR    = 28
) (
  input  logic              tck,
  input  logic              tms,
  input  logic              tdi,
  input  logic              trst_n,
  output logic              tdo,
  // system side
  input  logic              clk,
  input  logic              rst,
  input  logic [NCTRLB-1:0] ctrl_rdata,
  output logic [NCTRLB-1:0] ctrl_wdata,
  output logic              ctrl_load,     // clk domain, one cycle
  input  logic [NSTATB-1:0] status_in,
  input  logic [NBSR-1:0]   bsr_in,
  // ASD chain
  output logic              asd_tdi,
  output logic              asd_shift,
  output logic              asd_update,
  input  logic              asd_tdo,
  output logic [11:0]       gpo,
  output logic              jtag_error,
  output logic [3:0]        instruction
);

  typedef enum logic [3:0] {
    TLR, RTI, SEL_DR, CAP_DR, SH_DR, EX1_DR, PAU_DR, EX2_DR, UPD_DR,
    SEL_IR, CAP_IR, SH_IR, EX1_IR, PAU_IR, EX2_IR, UPD_IR
  } tap_t;

  localparam logic [3:0] I_IDCODE  = 4'b0001;
  localparam logic [3:0] I_SAMPLE  = 4'b0010;
  localparam logic [3:0] I_CONTROL = 4'b1000;
  localparam logic [3:0] I_ASD     = 4'b1001;
  localparam logic [3:0] I_STATUS  = 4'b1010;
  localparam logic [3:0] I_GPO     = 4'b1101;
  localparam logic [3:0] I_BYPASS  = 4'b1111;

  tap_t tap, tap_n;

  always_comb begin
    unique case (tap)
      TLR:    tap_n = tms ? TLR    : RTI;
      RTI:    tap_n = tms ? SEL_DR : RTI;
      SEL_DR: tap_n = tms ? SEL_IR : CAP_DR;
      CAP_DR: tap_n = tms ? EX1_DR : SH_DR;
      SH_DR:  tap_n = tms ? EX1_DR : SH_DR;
      EX1_DR: tap_n = tms ? UPD_DR : PAU_DR;
      PAU_DR: tap_n = tms ? EX2_DR : PAU_DR;
      EX2_DR: tap_n = tms ? UPD_DR : SH_DR;
      UPD_DR: tap_n = tms ? SEL_DR : RTI;
      SEL_IR: tap_n = tms ? TLR    : CAP_IR;
      CAP_IR: tap_n = tms ? EX1_IR : SH_IR;
      SH_IR:  tap_n = tms ? EX1_IR : SH_IR;
      EX1_IR: tap_n = tms ? UPD_IR : PAU_IR;
      PAU_IR: tap_n = tms ? EX2_IR : PAU_IR;
      EX2_IR: tap_n = tms ? UPD_IR : SH_IR;
      UPD_IR: tap_n = tms ? SEL_DR : RTI;
    endcase
  end

  logic [4:0]        ir_sr;
  logic [3:0]        ir;
  logic              byp;
  logic [31:0]       id_sr;
  logic [NCTRLB-1:0] ctl_sr;
  logic [NSTATB-1:0] st_sr;
  logic [NBSR-1:0]   bs_sr;
  logic [11:0]       gpo_sr;
  logic              asd_q;
  logic              upd_tog;

  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n) begin
      tap        <= TLR;
      ir_sr      <= '0;
      ir         <= I_IDCODE;
      byp        <= 1'b0;
      id_sr      <= '0;
      ctl_sr     <= '0;
      st_sr      <= '0;
      bs_sr      <= '0;
      gpo_sr     <= '0;
      gpo        <= '0;
      asd_q      <= 1'b0;
      ctrl_wdata <= '0;
      upd_tog    <= 1'b0;
      jtag_error <= 1'b0;
    end else begin
      tap <= tap_n;
      unique case (tap)
        TLR: ir <= I_IDCODE;
        CAP_IR: ir_sr <= 5'b00001;
        SH_IR:  ir_sr <= {tdi, ir_sr[4:1]};
        UPD_IR: begin
          if (^ir_sr) begin
            ir         <= I_BYPASS;
            jtag_error <= 1'b1;
          end else begin
            ir         <= ir_sr[3:0];
            jtag_error <= 1'b0;
          end
        end
        CAP_DR: begin
          byp <= 1'b0;
          case (ir)
            I_IDCODE:  id_sr  <= IDCODE;
            I_CONTROL: ctl_sr <= ctrl_rdata;
            I_STATUS:  st_sr  <= status_in;
            I_SAMPLE:  bs_sr  <= bsr_in;
            I_GPO:     gpo_sr <= gpo;
            default: ;
          endcase
        end
        SH_DR: begin
          case (ir)
            I_IDCODE:  id_sr  <= {tdi, id_sr[31:1]};
            I_CONTROL: ctl_sr <= {tdi, ctl_sr[NCTRLB-1:1]};
            I_STATUS:  st_sr  <= {tdi, st_sr[NSTATB-1:1]};
            I_SAMPLE:  bs_sr  <= {tdi, bs_sr[NBSR-1:1]};
            I_GPO:     gpo_sr <= {tdi, gpo_sr[11:1]};
            I_ASD:     asd_q  <= asd_tdo;
            default:   byp    <= tdi;
          endcase
        end
        UPD_DR: begin
          if (ir == I_CONTROL) begin
            ctrl_wdata <= ctl_sr;
            upd_tog    <= ~upd_tog;
          end
          if (ir == I_GPO) gpo <= gpo_sr;
        end
        default: ;
      endcase
    end
  end

  logic known;
  assign known = ir inside {I_IDCODE, I_CONTROL, I_STATUS, I_SAMPLE, I_GPO, I_ASD};

  logic tdo_n;
  always_comb begin
    if (tap == SH_IR) tdo_n = ir_sr[0];
    else begin
      case (ir)
        I_IDCODE:  tdo_n = id_sr[0];
        I_CONTROL: tdo_n = ctl_sr[0];
        I_STATUS:  tdo_n = st_sr[0];
        I_SAMPLE:  tdo_n = bs_sr[0];
        I_GPO:     tdo_n = gpo_sr[0];
        I_ASD:     tdo_n = asd_q;
        default:   tdo_n = byp;
      endcase
    end
  end

  always_ff @(negedge tck or negedge trst_n) begin
    if (!trst_n) tdo <= 1'b0;
    else         tdo <= tdo_n;
  end

  assign asd_tdi     = tdi;
  assign asd_shift   = (tap == SH_DR)  && (ir == I_ASD);
  assign asd_update  = (tap == UPD_DR) && (ir == I_ASD);
  assign instruction = known ? ir : I_BYPASS;

  // control register load, synchronised into the system clock domain
  logic [2:0] upd_sync;
  always_ff @(posedge clk) begin
    if (rst) upd_sync <= '0;
    else     upd_sync <= {upd_sync[1:0], upd_tog};
  end
  assign ctrl_load = upd_sync[2] ^ upd_sync[1];

endmodule
