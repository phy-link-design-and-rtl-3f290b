// zq_cal_ctrl - hybrid digital impedance calibration controller of the I/O driver.
//
// The driver has a reference leg, six binary-weighted calibration legs (cal_code,
// MSB strongest) and, for the hybrid linear search, three equal linear legs
// (lin_code, thermometer). Analog comparators report the pad voltage against
// VREF = VDD/2: `match` (within +-1%), `above` (higher than VREF) and `mode`
// (within the +-5% mode window). Sections are calibrated in turn, selected by
// sel_line: 0 pull-up PFET (against the external resistor), 1 pull-down NFET
// (against the calibrated PFET), 2 terminator. For the PFET a stronger leg raises
// the pad voltage; for the other two sections it lowers it.
// Each section starts from the reference leg alone (calibration and linear legs
// off), the setting for no PVT variation. If `match` already holds, that is kept.
// Otherwise the reference check decides the direction, then:
//   binary (conventional, or mode = 0): reference leg on when the driver is too
//     weak, code starts at the centre 100000b and moves +-16, 8, 4, 2, 1, one step
//     per clock, stopping as soon as match is high
//   hybrid linear (mode = 1): too weak -> reference leg on, all calibration legs
//     off; too strong -> reference off, the three MSB legs on; the linear legs then
//     step one at a time from the middle
//   hybrid reduced binary (mode = 1): as above, but the three LSB calibration legs
//     are searched in binary from 100b
// On match (or an exhausted search) the code, the reference-leg state (ref_save)
// and the linear legs (lin_save) are stored, SETTLE clocks are waited
// for the comparators, and the next section starts. cycles counts the clocks the
// searches took. The algorithms are the document's; the exact start values of the
// linear search and the terminator direction are this design's.
module zq_cal_ctrl
  import phy_pkg::*;
#(
  parameter int CAL_W  = 6,
  parameter int LIN_W  = 3,
  parameter int SETTLE = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  cal_algo_t        algo,
  input  logic             match,
  input  logic             above,
  input  logic             mode,
  output logic [1:0]       sel_line,
  output logic             ref_on,
  output logic [CAL_W-1:0] cal_code,
  output logic [LIN_W-1:0] lin_code,
  output logic [CAL_W-1:0] pcode,
  output logic [CAL_W-1:0] ncode,
  output logic [CAL_W-1:0] tcode,
  output logic [2:0]       ref_save,  // stored reference-leg state per section
  output logic [LIN_W-1:0] lin_save [3],
  output logic [3:0]       n_bin,     // sections searched in binary
  output logic [3:0]       n_hyb,     // sections searched by a hybrid step
  output logic [15:0]      cycles,
  output logic             done
);
  typedef enum logic [2:0] {Z_IDLE, Z_INIT, Z_REF, Z_SEARCH, Z_SAVE, Z_WAIT, Z_DONE} z_state_t;
  typedef enum logic [1:0] {S_BIN, S_LIN, S_RB} s_kind_t;
  z_state_t st;
  s_kind_t  kind;

  logic [CAL_W-1:0] step;
  logic [1:0]       lin_n;          // number of linear legs on
  logic [1:0]       wcnt;
  logic             stronger;       // driver must get stronger

  localparam logic [CAL_W-1:0] CENTER = CAL_W'(1) << (CAL_W-1);
  localparam logic [CAL_W-1:0] MSB3   = {3'b111, {(CAL_W-3){1'b0}}};

  assign stronger  = (sel_line == 2'd0) ? !above : above;
  assign lin_code  = LIN_W'((1 << lin_n) - 1);
  assign done      = (st == Z_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= Z_IDLE; kind <= S_BIN;
      sel_line <= '0; ref_on <= 1'b1; cal_code <= '0; lin_n <= '0;
      pcode <= '0; ncode <= '0; tcode <= '0; n_bin <= '0; n_hyb <= '0;
      ref_save <= '0; lin_save <= '{default: '0};
      step <= '0; wcnt <= '0; cycles <= '0;
    end else begin
      unique case (st)
        Z_IDLE, Z_DONE: if (start) begin
          sel_line <= '0;
          cycles   <= '0;
          n_bin    <= '0;
          n_hyb    <= '0;
          ref_on   <= 1'b1;
          cal_code <= '0;
          lin_n    <= '0;
          st       <= Z_INIT;
        end
        Z_INIT: begin                               // INITIAL STATE: match?
          if (match) begin
            st <= Z_SAVE;
          end else st <= Z_REF;
        end
        Z_REF: begin                                // REFERENCE CHECK
          cycles <= cycles + 1'b1;
          if (algo != CAL_BINARY && mode) begin
            kind  <= (algo == CAL_HYB_LIN) ? S_LIN : S_RB;
            n_hyb <= n_hyb + 1'b1;
            ref_on <= stronger;
            if (algo == CAL_HYB_LIN) begin
              cal_code <= stronger ? '0 : MSB3;
              lin_n    <= 2'd2;                     // middle of the linear range
            end else begin
              cal_code <= (stronger ? '0 : MSB3) | CAL_W'(3'b100);
              step     <= CAL_W'(2);
            end
          end else begin
            kind     <= S_BIN;
            n_bin    <= n_bin + 1'b1;
            ref_on   <= stronger;
            cal_code <= CENTER;
            lin_n    <= '0;
            step     <= CENTER >> 1;
          end
          st <= Z_SEARCH;
        end
        Z_SEARCH: begin                             // START CALIBRATION until match
          cycles <= cycles + 1'b1;
          if (match) st <= Z_SAVE;
          else unique case (kind)
            S_BIN, S_RB: begin
              if (step == 0) st <= Z_SAVE;
              else begin
                cal_code <= stronger ? cal_code + step : cal_code - step;
                step     <= step >> 1;
              end
            end
            S_LIN: begin
              if (stronger && lin_n != 2'd3)     lin_n <= lin_n + 1'b1;
              else if (!stronger && lin_n != 0)  lin_n <= lin_n - 1'b1;
              else                               st <= Z_SAVE;
            end
            default: st <= Z_SAVE;
          endcase
        end
        Z_SAVE: begin
          unique case (sel_line)
            2'd0:    pcode <= cal_code;
            2'd1:    ncode <= cal_code;
            default: tcode <= cal_code;
          endcase
          ref_save[sel_line] <= ref_on;
          lin_save[sel_line] <= lin_code;
          wcnt <= '0;
          st   <= Z_WAIT;
        end
        Z_WAIT: begin                               // let the comparators settle
          wcnt <= wcnt + 1'b1;
          if (wcnt == 2'(SETTLE-1)) begin
            if (sel_line == 2'd2) st <= Z_DONE;
            else begin
              sel_line <= sel_line + 1'b1;
              ref_on   <= 1'b1;
              cal_code <= '0;
              lin_n    <= '0;
              st       <= Z_INIT;
            end
          end
        end
        default: st <= Z_IDLE;
      endcase
    end
  end
endmodule
