// pulse_synth_top: pulse synthesiser with timing resolution finer than the DAC period.
//
// The pulse is first drawn at a virtual sample rate N times the DAC rate (one clock of
// `clk` per virtual sample), then band-limited to what the DAC can reproduce and only
// then decimated by N. The timing of each edge survives the decimation as the values of
// the band-limited samples around it, so width, rise and fall can be set in steps of the
// virtual sample period (and here in quarter steps) although the DAC runs N times slower.
//
//   host words -> local_interface -> param_ctrl --+--> waveform_sample_generator (N*fs)
//                                                 |         -> digital_filter (N*fs)
//                                                 |         -> downsampler (fs, from
//                                                 |            clock_divider /N)
//                                                 |         -> dac_lane_packer (fs/8)
//                                                 +--> waveform_memory (host samples)
//   dac_word/dac_valid <- generated words, or memory words in playback mode
//
// Interface. `host_valid`/`host_data` carry the packets decoded by local_interface (no
// back-pressure). `dac_word` is LANES samples for the DAC, lane 0 first in time, valid
// for one clock with `dac_valid`, once every N*LANES clocks. The DAC, its serial link,
// the analogue low-pass, clocking and the host are outside this module; the sample
// streams inside are brought out for observation (`virt_sample` at N*fs, `fs_sample`
// with `fs_valid` at fs). `period_start` marks the first virtual sample of each pulse
// period at `virt_sample`.
//
// Timing: one clock domain at the virtual rate; the fs and fs/8 rates are clock enables.
// The mode and run bits take effect on commit; pulse parameters at the next period.
module pulse_synth_top
  import pulse_pkg::*;
#(
  parameter int LANES     = 8,
  parameter int MEM_DEPTH = 1024
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    host_valid,
  input  logic [31:0] host_data,
  output sample_t dac_word [LANES],
  output logic    dac_valid,
  output logic    playback,
  output logic    play_wrap,
  output sample_t virt_sample,
  output logic    period_start,
  output sample_t fs_sample,
  output logic    fs_valid,
  output logic    busy,
  output logic    param_error,
  output logic    bad_header
);

  localparam int WAVE_IDX_W = $clog2(LANES * MEM_DEPTH);
  localparam int PLAY_LEN_W = $clog2(MEM_DEPTH) + 1;

  lbus_wr_t              lbus;
  pulse_params_t         params;
  logic                  params_load, run, sync, fs_en;
  logic [DECIM_W-1:0]    decim_n;
  logic [PLAY_LEN_W-1:0] play_len;
  filt_coef_t            coef;
  logic                  wave_we;
  logic [WAVE_IDX_W-1:0] wave_index;
  sample_t               wave_data;
  sample_t               filt_sample;
  sample_t               gen_word [LANES];
  sample_t               mem_word [LANES];
  logic                  gen_valid, mem_valid, mem_wrapped;

  local_interface u_if (
    .clk, .rst_n, .host_valid, .host_data, .lbus, .bad_header
  );

  param_ctrl #(.WAVE_IDX_W(WAVE_IDX_W), .PLAY_LEN_W(PLAY_LEN_W)) u_param (
    .clk, .rst_n, .lbus, .params, .params_load, .run, .playback, .decim_n, .play_len,
    .coef, .sync, .wave_we, .wave_index, .wave_data, .busy, .param_error
  );

  waveform_sample_generator u_gen (
    .clk, .rst_n, .run, .load(params_load), .pend(params),
    .sample(virt_sample), .sample_wrap(period_start)
  );

  digital_filter u_filt (
    .clk, .rst_n, .en(1'b1), .coef, .din(virt_sample), .dout(filt_sample)
  );

  clock_divider u_div (
    .clk, .rst_n, .en(run), .sync, .n(decim_n), .fs_en
  );

  downsampler u_ds (
    .clk, .rst_n, .fs_en, .din(filt_sample), .dout(fs_sample), .dout_valid(fs_valid)
  );

  dac_lane_packer #(.LANES(LANES)) u_pack (
    .clk, .rst_n, .sync, .din_valid(fs_valid), .din(fs_sample),
    .word(gen_word), .word_valid(gen_valid)
  );

  waveform_memory #(.LANES(LANES), .DEPTH(MEM_DEPTH)) u_mem (
    .clk, .rst_n, .wr_en(wave_we), .wr_index(wave_index), .wr_data(wave_data),
    .play(playback && run), .frame(gen_valid), .len(play_len),
    .word(mem_word), .word_valid(mem_valid), .wrapped(mem_wrapped)
  );

  // Output selection, registered.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dac_valid <= 1'b0;
      play_wrap <= 1'b0;
      for (int i = 0; i < LANES; i++) dac_word[i] <= '0;
    end else if (playback) begin
      dac_valid <= mem_valid;
      play_wrap <= mem_wrapped;
      if (mem_valid) dac_word <= mem_word;
    end else begin
      dac_valid <= gen_valid;
      play_wrap <= 1'b0;
      if (gen_valid) dac_word <= gen_word;
    end
  end

endmodule
