// shm_top: programmable-logic part of the Lamb-wave structural health
// monitoring system.
//
// One acquisition: the processor raises `start`; acq_ctrl fires the
// tone-burst generator (15 kHz, 3.5 cycles, to the DAC driving the
// transmitting PZT) and at the same clock opens the capture gate of the four
// receiver channels. Each channel takes N_SAMPLES ADC samples through a FIFO;
// every sample leaving the FIFO is written to the channel's raw buffer and
// streamed into the channel's DWT block (offset removal, Q12.20 conversion,
// three-level db4 transform, int16 export), whose 250 level-3 coefficients
// go to the channel's filtered buffer. `done` pulses when all buffers are
// complete. The processor then reads either buffer of any channel through
// the read port: rd_filtered selects raw ADC data (0) or DWT output (1),
// rd_ch the channel, rd_addr the word; rd_data follows one clock later.
// The DWT path takes one sample per clock, so a channel FIFO holds at most
// one or two samples at the converter rates; it decouples the converter
// strobe from the storage and processing path.
//
// The linear SVM / Mahalanobis classifier sits beside the acquisition path:
// the reduced feature vector and the trained model come from the processor
// side, as in the described system, and its ports are brought out.
//
// The processor, the ADC and DAC converters and their serial links are
// outside this module: converters appear as parallel sample ports with a
// strobe, the processor side as plain control, status and read ports.
module shm_top
  import shm_pkg::*;
#(
  parameter int unsigned N_SAMPLES  = 2048,
  parameter int unsigned FIFO_DEPTH = 16,
  parameter int unsigned N_FEAT     = 4,
  parameter int unsigned CLK_HZ     = 100_000_000,
  parameter int unsigned DAC_HZ     = 1_000_000,
  parameter int unsigned TONE_HZ    = 15_000
) (
  input  logic        clk,
  input  logic        rst_n,
  // acquisition control / status
  input  logic        start,
  output logic        busy,
  output logic        done,
  // receivers (one ADC per channel)
  input  logic        adc_valid [N_CH],
  input  adc_word_t   adc_data  [N_CH],
  // transmitter DAC
  output logic        dac_valid,
  output logic [11:0] dac_data,
  // buffer read port
  input  logic                         rd_filtered,
  input  logic [$clog2(N_CH)-1:0]      rd_ch,
  input  logic [$clog2(N_SAMPLES)-1:0] rd_addr,
  output logic [15:0]                  rd_data,
  // classifier
  input  logic        svm_start,
  input  fix_t        feat      [N_FEAT],
  input  fix_t        svm_w     [N_FEAT],
  input  fix_t        svm_bias,
  input  fix_t        maha_mu   [N_FEAT],
  input  fix_t        maha_sinv [N_FEAT][N_FEAT],
  input  fix_t        maha_threshold,
  output logic        svm_busy,
  output logic        svm_done,
  output logic        svm_class,
  output logic        svm_outlier,
  output fix_t        svm_score,
  output fix_t        maha_dist2
);
  localparam int unsigned L1     = unsigned'(dwt_out_len(int'(N_SAMPLES)));
  localparam int unsigned L2     = unsigned'(dwt_out_len(int'(L1)));
  localparam int unsigned N_COEF = unsigned'(dwt_out_len(int'(L2)));
  localparam int unsigned RAW_AW = $clog2(N_SAMPLES);
  localparam int unsigned COEF_AW = $clog2(N_COEF);

  logic            burst_start, burst_busy, burst_done;
  logic [N_CH-1:0] capture_en, adc_take, raw_take, dwt_take, dwt_last;
  logic [N_CH-1:0][RAW_AW-1:0]  raw_addr;
  logic [N_CH-1:0][COEF_AW-1:0] dwt_addr;
  logic [15:0]     raw_rdata [N_CH];
  logic [15:0]     dwt_rdata [N_CH];

  acq_ctrl #(.N_CH(N_CH), .N_SAMPLES(N_SAMPLES), .N_COEF(N_COEF)) u_ctrl (
    .clk, .rst_n, .start, .busy, .done,
    .burst_start, .burst_busy,
    .capture_en, .adc_take, .raw_take, .dwt_take, .dwt_last,
    .raw_addr, .dwt_addr
  );

  tone_burst_gen #(.CLK_HZ(CLK_HZ), .DAC_HZ(DAC_HZ), .TONE_HZ(TONE_HZ)) u_burst (
    .clk, .rst_n, .start(burst_start), .busy(burst_busy), .done(burst_done),
    .dac_valid, .dac_data
  );

  for (genvar c = 0; c < N_CH; c++) begin : g_ch
    logic        f_in_ready, f_out_valid, f_out_ready;
    adc_word_t   f_out_data;
    logic        d_out_valid, d_out_last;
    out_word_t   d_out_data;
    logic [$clog2(FIFO_DEPTH+1)-1:0] f_count;

    assign adc_take[c] = adc_valid[c] && capture_en[c] && f_in_ready;

    stream_fifo #(.WIDTH(16), .DEPTH(FIFO_DEPTH)) u_fifo (
      .clk, .rst_n,
      .in_valid(adc_valid[c] && capture_en[c]), .in_ready(f_in_ready), .in_data(adc_data[c]),
      .out_valid(f_out_valid), .out_ready(f_out_ready), .out_data(f_out_data),
      .count(f_count)
    );

    assign raw_take[c] = f_out_valid && f_out_ready;

    sample_ram #(.WIDTH(16), .DEPTH(N_SAMPLES)) u_raw (
      .clk, .we(raw_take[c]), .waddr(raw_addr[c]), .wdata(f_out_data),
      .raddr(rd_addr), .rdata(raw_rdata[c])
    );

    dwt_pipeline_full #(.N_SAMPLES(N_SAMPLES)) u_dwt (
      .clk, .rst_n,
      .in_valid(f_out_valid), .in_ready(f_out_ready), .in_data(f_out_data),
      .out_valid(d_out_valid), .out_ready(1'b1), .out_data(d_out_data), .out_last(d_out_last)
    );

    assign dwt_take[c] = d_out_valid;
    assign dwt_last[c] = d_out_last;

    sample_ram #(.WIDTH(16), .DEPTH(N_COEF)) u_filt (
      .clk, .we(dwt_take[c]), .waddr(dwt_addr[c]), .wdata(d_out_data),
      .raddr(rd_addr[COEF_AW-1:0]), .rdata(dwt_rdata[c])
    );
  end

  // read mux, aligned with the one-clock RAM read
  logic                    rd_filtered_q;
  logic [$clog2(N_CH)-1:0] rd_ch_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_filtered_q <= 1'b0;
      rd_ch_q       <= '0;
    end else begin
      rd_filtered_q <= rd_filtered;
      rd_ch_q       <= rd_ch;
    end
  end

  assign rd_data = rd_filtered_q ? dwt_rdata[rd_ch_q] : raw_rdata[rd_ch_q];

  svm_mahalanobis #(.N_FEAT(N_FEAT)) u_svm (
    .clk, .rst_n, .start(svm_start),
    .feat, .w(svm_w), .bias(svm_bias), .mu(maha_mu), .s_inv(maha_sinv), .threshold(maha_threshold),
    .busy(svm_busy), .done(svm_done), .class_out(svm_class), .outlier(svm_outlier),
    .score(svm_score), .dist2(maha_dist2)
  );
endmodule
