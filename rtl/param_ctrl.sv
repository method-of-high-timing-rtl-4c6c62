// param_ctrl: the parameter control module - register file and distributor.
//
// Takes local-bus writes and serves the three processing stages:
//  * sample generator: pulse period (ticks), width Tw, rise Tr and fall Tf (quarter
//    ticks), high and low levels; from these it derives the region thresholds
//      K1 = 1.25*Tr   K2 = Tw + 0.625*(Tr-Tf)   K3 = Tw + 0.625*(Tr+Tf)
//    and the two edge slopes (0.8/T)*(V_H-V_L) per tick of the pulse equations;
//  * digital filter: FILT_SECTIONS x 5 coefficients, written straight into use, reset
//    to the Butterworth defaults of pulse_pkg;
//  * downsampling: the factor N; and the playback controls and waveform memory writes.
// Pulse registers, N, the run bit and the mode bit are staged and only take effect on a
// write to REG_COMMIT. A commit first checks the set: V_H >= V_L, the rising edge ends
// before the falling edge starts (8*Tw >= 5*(Tr+Tf), i.e. Tw >= 0.625*(Tr+Tf)), the
// pulse ends within the period, period >= 1 and N >= 1. A bad set is refused, raising
// `param_error` (cleared by the next good commit), and the old set stays in use. A good
// set has its slopes divided out by a serial divider (two divisions of SLOPE_W clocks)
// and is then sent with a one-clock `params_load`; the generator applies it at its next
// period start. `sync` pulses with it when N or the run bit changed, to realign the
// fs strobe. The register map, the checks and the staging are this design's; the
// distribution of parameters to the three stages follows the method.
//
// K1 = 10*Tr in 1/32 tick is always even, so its lowest bit is constant zero.
//
// Timing: `busy` from the commit write until `params_load`, about 2*SLOPE_W+3 clocks.
module param_ctrl
  import pulse_pkg::*;
#(
  parameter int WAVE_IDX_W = 13,
  parameter int PLAY_LEN_W = 11
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  lbus_wr_t              lbus,
  output pulse_params_t         params,
  output logic                  params_load,
  output logic                  run,
  output logic                  playback,
  output logic [DECIM_W-1:0]    decim_n,
  output logic [PLAY_LEN_W-1:0] play_len,
  output filt_coef_t            coef,
  output logic                  sync,
  output logic                  wave_we,
  output logic [WAVE_IDX_W-1:0] wave_index,
  output sample_t               wave_data,
  output logic                  busy,
  output logic                  param_error
);

  localparam int AMP_W = SAMPLE_W + 1;
  localparam int DEN_W = TIME_W + 3;

  typedef enum logic [2:0] {ST_IDLE, ST_CHECK, ST_DIV_R, ST_DIV_F, ST_APPLY} state_e;

  // staged registers
  logic [1:0]         ctrl_s;
  logic [K_W-1:0]     period_s;
  logic [TIME_W-1:0]  tw_s, tr_s, tf_s;
  sample_t            vh_s, vl_s;
  logic [DECIM_W-1:0] decim_s;

  state_e             state;
  logic [THR_W-1:0]   k1, k2;
  logic [THR_W+2:0]   k3, k_end;
  logic [AMP_W-1:0]   amp;
  logic               set_ok;

  logic               div_start, div_done;
  logic [SLOPE_W-1:0] div_num, div_quot;
  logic [DEN_W-1:0]   div_den;
  logic [SLOPE_W-1:0] slope_r_q;

  // thresholds in 1/2^THR_FRAC tick
  always_comb begin
    k1    = THR_W'((THR_W+3)'(tr_s) * 10);
    k2    = THR_W'((THR_W+3)'(tw_s) * 8 + (THR_W+3)'(tr_s) * 5 - (THR_W+3)'(tf_s) * 5);
    k3    = (THR_W+3)'(tw_s) * 8 + (THR_W+3)'(tr_s) * 5 + (THR_W+3)'(tf_s) * 5;
    k_end = (THR_W+3)'(period_s) << THR_FRAC;
    amp   = AMP_W'(vh_s) - AMP_W'(vl_s);
    set_ok = (vh_s >= vl_s)
          && ((THR_W+3)'(tw_s) * 8 >= ((THR_W+3)'(tr_s) + (THR_W+3)'(tf_s)) * 5)
          && (k3 <= k_end)
          && (period_s != '0)
          && (decim_s != '0);
  end

  // slope = round(amp * 4 * 2^(TIME_FRAC+SLOPE_FRAC) / (5 * T)), T in quarter ticks
  function automatic logic [SLOPE_W-1:0] slope_num(input logic [AMP_W-1:0] a,
                                                   input logic [TIME_W-1:0] t);
    return (SLOPE_W'(a) << (2 + TIME_FRAC + SLOPE_FRAC)) + SLOPE_W'((DEN_W'(t) * 5) >> 1);
  endfunction

  serial_divider #(.NW(SLOPE_W), .DW(DEN_W)) u_div (
    .clk, .rst_n, .start(div_start), .num(div_num), .den(div_den),
    .busy(), .done(div_done), .quot(div_quot)
  );

  always_comb begin
    div_start = 1'b0;
    div_num   = '0;
    div_den   = '0;
    if (state == ST_CHECK && set_ok && tr_s != '0) begin
      div_start = 1'b1;
      div_num   = slope_num(amp, tr_s);
      div_den   = DEN_W'(tr_s) * 5;
    end else if (state == ST_DIV_R && (div_done || tr_s == '0) && tf_s != '0) begin
      div_start = 1'b1;
      div_num   = slope_num(amp, tf_s);
      div_den   = DEN_W'(tf_s) * 5;
    end
  end

  assign busy = (state != ST_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ctrl_s      <= '0;
      period_s    <= '0;
      tw_s        <= '0;
      tr_s        <= '0;
      tf_s        <= '0;
      vh_s        <= '0;
      vl_s        <= '0;
      decim_s     <= DECIM_W'(8);
      play_len    <= PLAY_LEN_W'(1);
      coef        <= BUTTER_DEFAULT;
      state       <= ST_IDLE;
      params      <= '0;
      params_load <= 1'b0;
      run         <= 1'b0;
      playback    <= 1'b0;
      decim_n     <= DECIM_W'(8);
      sync        <= 1'b0;
      slope_r_q   <= '0;
      wave_we     <= 1'b0;
      wave_index  <= '0;
      wave_data   <= '0;
      param_error <= 1'b0;
    end else begin
      params_load <= 1'b0;
      sync        <= 1'b0;
      wave_we     <= 1'b0;

      if (lbus.we) begin
        if (lbus.addr[15]) begin
          wave_we    <= 1'b1;
          wave_index <= WAVE_IDX_W'(lbus.addr);
          wave_data  <= SAMPLE_W'(lbus.data);
        end else begin
          unique case (lbus.addr)
            REG_CTRL:    ctrl_s   <= lbus.data[1:0];
            REG_PERIOD:  period_s <= K_W'(lbus.data);
            REG_TW:      tw_s     <= TIME_W'(lbus.data);
            REG_TR:      tr_s     <= TIME_W'(lbus.data);
            REG_TF:      tf_s     <= TIME_W'(lbus.data);
            REG_VHIGH:   vh_s     <= SAMPLE_W'(lbus.data);
            REG_VLOW:    vl_s     <= SAMPLE_W'(lbus.data);
            REG_DECIM:   decim_s  <= DECIM_W'(lbus.data);
            REG_PLAYLEN: play_len <= PLAY_LEN_W'(lbus.data);
            REG_COMMIT:  if (state == ST_IDLE) state <= ST_CHECK;
            default: begin
              for (int s = 0; s < FILT_SECTIONS; s++) begin
                if (lbus.addr == REG_COEF + LB_ADDR_W'(5*s))     coef[s].b0 <= COEF_W'(lbus.data);
                if (lbus.addr == REG_COEF + LB_ADDR_W'(5*s + 1)) coef[s].b1 <= COEF_W'(lbus.data);
                if (lbus.addr == REG_COEF + LB_ADDR_W'(5*s + 2)) coef[s].b2 <= COEF_W'(lbus.data);
                if (lbus.addr == REG_COEF + LB_ADDR_W'(5*s + 3)) coef[s].a1 <= COEF_W'(lbus.data);
                if (lbus.addr == REG_COEF + LB_ADDR_W'(5*s + 4)) coef[s].a2 <= COEF_W'(lbus.data);
              end
            end
          endcase
        end
      end

      unique case (state)
        ST_IDLE: ;
        ST_CHECK: begin
          if (!set_ok) begin
            param_error <= 1'b1;
            state       <= ST_IDLE;
          end else begin
            param_error <= 1'b0;
            state       <= ST_DIV_R;
          end
        end
        ST_DIV_R: begin
          if (tr_s == '0) begin
            slope_r_q <= '0;
            state     <= ST_DIV_F;
          end else if (div_done) begin
            slope_r_q <= div_quot;
            state     <= ST_DIV_F;
          end
        end
        ST_DIV_F: begin
          if (tf_s == '0 || div_done) begin
            params.period       <= period_s;
            params.k_rise_end   <= k1;
            params.k_fall_start <= k2;
            params.k_fall_end   <= THR_W'(k3);
            params.slope_r      <= slope_r_q;
            params.slope_f      <= (tf_s == '0) ? '0 : div_quot;
            params.v_high       <= vh_s;
            params.v_low        <= vl_s;
            state               <= ST_APPLY;
          end
        end
        ST_APPLY: begin
          params_load <= 1'b1;
          run         <= ctrl_s[0];
          playback    <= ctrl_s[1];
          decim_n     <= decim_s;
          sync        <= (decim_s != decim_n) || (ctrl_s[0] != run);
          state       <= ST_IDLE;
        end
        default: state <= ST_IDLE;
      endcase
    end
  end

endmodule
