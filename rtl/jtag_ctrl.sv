// jtag_ctrl: JTAG (IEEE 1149.1) slow-control interface of the sensor.
//
// A standard 16-state TAP controller, clocked by tck, with a 4-bit
// instruction register and these data registers, each shifted least
// significant bit first (tdi enters at the top, tdo leaves from bit 0):
//   IDCODE  (4'b0001)  32-bit identification code, read only
//   DAC     (4'b0010)  N_DAC codes of 8 bits for the on-chip bias DACs;
//                      code g (g < N_GROUPS) is the threshold of group g,
//                      code N_GROUPS the test voltage used when the
//                      discriminators are isolated, the rest other biases
//   CTRL    (4'b0011)  8 bits: [0] run, [1] isolate the discriminators from
//                      the array, [2] feed the zero suppression from the
//                      PATTERN register, [3] enable the 8b/10b output,
//                      [4] single-line output
//   PATTERN (4'b0100)  N_COLS bits, one row of hits for testing the zero
//                      suppression on its own
//   BYPASS  (4'b1111 and any other code) 1 bit
// Capture-DR loads the present value (so registers can be read back),
// Update-DR copies the shifted value into the register driving the chip.
// tdo changes on the falling edge of tck, as the standard requires. The
// test-logic-reset state selects IDCODE; trst_n also clears the registers.
// The outputs are static settings, to be written while the readout is
// stopped, and are used in the system clock domain without synchronisers.
// That biases, references and test mode are set through JTAG follows the
// sensor description; the instruction codes and register layout are this
// design's choice.
module jtag_ctrl
  import m26_pkg::*;
#(
  parameter int unsigned N_COLS   = N_COLS_DEF,
  parameter int unsigned N_GROUPS = N_GROUPS_DEF,
  parameter int unsigned N_DAC    = 8,
  parameter logic [31:0] IDCODE   = 32'h0260_0001
) (
  input  logic                         tck,
  input  logic                         trst_n,
  input  logic                         tms,
  input  logic                         tdi,
  output logic                         tdo,
  output logic [N_DAC-1:0][THR_W-1:0]  dac,
  output logic [7:0]                   ctrl,
  output logic [N_COLS-1:0]            pattern
);
  typedef enum logic [3:0] {
    TLR, RTI, SEL_DR, CAP_DR, SH_DR, EX1_DR, PAU_DR, EX2_DR, UPD_DR,
    SEL_IR, CAP_IR, SH_IR, EX1_IR, PAU_IR, EX2_IR, UPD_IR
  } tap_state_e;

  typedef enum logic [3:0] {
    I_IDCODE = 4'b0001, I_DAC = 4'b0010, I_CTRL = 4'b0011,
    I_PATTERN = 4'b0100, I_BYPASS = 4'b1111
  } instr_e;

  tap_state_e st, st_n;

  always_comb begin
    unique case (st)
      TLR:    st_n = tms ? TLR    : RTI;
      RTI:    st_n = tms ? SEL_DR : RTI;
      SEL_DR: st_n = tms ? SEL_IR : CAP_DR;
      CAP_DR: st_n = tms ? EX1_DR : SH_DR;
      SH_DR:  st_n = tms ? EX1_DR : SH_DR;
      EX1_DR: st_n = tms ? UPD_DR : PAU_DR;
      PAU_DR: st_n = tms ? EX2_DR : PAU_DR;
      EX2_DR: st_n = tms ? UPD_DR : SH_DR;
      UPD_DR: st_n = tms ? SEL_DR : RTI;
      SEL_IR: st_n = tms ? TLR    : CAP_IR;
      CAP_IR: st_n = tms ? EX1_IR : SH_IR;
      SH_IR:  st_n = tms ? EX1_IR : SH_IR;
      EX1_IR: st_n = tms ? UPD_IR : PAU_IR;
      PAU_IR: st_n = tms ? EX2_IR : PAU_IR;
      EX2_IR: st_n = tms ? UPD_IR : SH_IR;
      UPD_IR: st_n = tms ? SEL_DR : RTI;
      default: st_n = TLR;
    endcase
  end

  always_ff @(posedge tck or negedge trst_n)
    if (!trst_n) st <= TLR;
    else         st <= st_n;

  localparam int unsigned DAC_W = N_DAC * THR_W;

  logic [3:0]        ir, ir_sr;
  logic [31:0]       id_sr;
  logic [DAC_W-1:0]  dac_sr;
  logic [7:0]        ctrl_sr;
  logic [N_COLS-1:0] pat_sr;
  logic              byp_sr;

  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n) begin
      ir <= I_IDCODE; ir_sr <= '0; id_sr <= '0; dac_sr <= '0; ctrl_sr <= '0;
      pat_sr <= '0; byp_sr <= 1'b0; dac <= '0; ctrl <= '0; pattern <= '0;
    end else begin
      unique case (st)
        TLR:    ir <= I_IDCODE;
        CAP_IR: ir_sr <= 4'b0001;
        SH_IR:  ir_sr <= {tdi, ir_sr[3:1]};
        UPD_IR: ir <= ir_sr;
        CAP_DR: begin
          unique case (ir)
            I_IDCODE:  id_sr   <= IDCODE;
            I_DAC:     dac_sr  <= dac;
            I_CTRL:    ctrl_sr <= ctrl;
            I_PATTERN: pat_sr  <= pattern;
            default:   byp_sr  <= 1'b0;
          endcase
        end
        SH_DR: begin
          unique case (ir)
            I_IDCODE:  id_sr   <= {tdi, id_sr[31:1]};
            I_DAC:     dac_sr  <= {tdi, dac_sr[DAC_W-1:1]};
            I_CTRL:    ctrl_sr <= {tdi, ctrl_sr[7:1]};
            I_PATTERN: pat_sr  <= {tdi, pat_sr[N_COLS-1:1]};
            default:   byp_sr  <= tdi;
          endcase
        end
        UPD_DR: begin
          unique case (ir)
            I_DAC:     dac     <= dac_sr;
            I_CTRL:    ctrl    <= ctrl_sr;
            I_PATTERN: pattern <= pat_sr;
            default: ;
          endcase
        end
        default: ;
      endcase
    end
  end

  logic tdo_c;
  always_comb begin
    if (st == SH_IR) tdo_c = ir_sr[0];
    else begin
      unique case (ir)
        I_IDCODE:  tdo_c = id_sr[0];
        I_DAC:     tdo_c = dac_sr[0];
        I_CTRL:    tdo_c = ctrl_sr[0];
        I_PATTERN: tdo_c = pat_sr[0];
        default:   tdo_c = byp_sr;
      endcase
    end
  end

  always_ff @(negedge tck or negedge trst_n)
    if (!trst_n) tdo <= 1'b0;
    else         tdo <= (st == SH_IR || st == SH_DR) ? tdo_c : 1'b0;

  initial assert (N_DAC > N_GROUPS) else $error("need a DAC code for each group and the test voltage");
endmodule
