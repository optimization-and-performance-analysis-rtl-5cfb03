// acq_ctrl: main control FSM of one acquisition.
//
// On `start` the FSM fires the excitation burst and, in the same clock,
// opens the capture gate of all receiver channels, so every waveform is
// aligned to the excitation. Each channel admits exactly N_SAMPLES ADC
// samples into its FIFO; its gate closes by itself after the last one. The
// FSM keeps one write address per channel for the raw buffer (advanced on
// every sample leaving the FIFO) and one for the filtered buffer (advanced on
// every DWT coefficient). The acquisition is complete when every channel has
// stored all raw samples and its DWT frame has ended (last coefficient seen)
// and the burst generator has finished; `done` then pulses and `busy` drops.
//
//   IDLE --start--> CAPTURE --all raw stored--> DRAIN --all DWT frames and
//   burst done--> IDLE (done pulse)
//
// A start while busy is ignored. The raw/filtered storage and the single
// start-to-done sequence follow the system description; the state encoding
// and the per-channel bookkeeping are this design's.
module acq_ctrl #(
  parameter int unsigned N_CH      = 4,
  parameter int unsigned N_SAMPLES = 2048,
  parameter int unsigned N_COEF    = 250
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         start,
  output logic                         busy,
  output logic                         done,
  output logic                         burst_start,
  input  logic                         burst_busy,
  output logic [N_CH-1:0]              capture_en,
  input  logic [N_CH-1:0]              adc_take,     // sample admitted into FIFO
  input  logic [N_CH-1:0]              raw_take,     // sample left FIFO, written raw
  input  logic [N_CH-1:0]              dwt_take,     // coefficient written
  input  logic [N_CH-1:0]              dwt_last,     // ... and it is the frame's last
  output logic [N_CH-1:0][$clog2(N_SAMPLES)-1:0] raw_addr,
  output logic [N_CH-1:0][$clog2(N_COEF)-1:0]    dwt_addr
);
  localparam int unsigned SW = $clog2(N_SAMPLES + 1);

  typedef enum logic [1:0] {S_IDLE, S_CAPTURE, S_DRAIN} state_t;
  state_t state;

  logic [N_CH-1:0][SW-1:0] adm_cnt, raw_cnt;
  logic [N_CH-1:0]         frame_end;
  logic                    all_raw, all_dwt;

  always_comb begin
    all_raw = 1'b1;
    all_dwt = &frame_end;
    for (int c = 0; c < int'(N_CH); c++) begin
      capture_en[c] = (state == S_CAPTURE) && (adm_cnt[c] < SW'(N_SAMPLES));
      raw_addr[c]   = raw_cnt[c][$clog2(N_SAMPLES)-1:0];
      if (raw_cnt[c] != SW'(N_SAMPLES)) all_raw = 1'b0;
    end
  end

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      adm_cnt     <= '0;
      raw_cnt     <= '0;
      dwt_addr    <= '0;
      frame_end   <= '0;
      done        <= 1'b0;
      burst_start <= 1'b0;
    end else begin
      done        <= 1'b0;
      burst_start <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          state       <= S_CAPTURE;
          burst_start <= 1'b1;
          adm_cnt     <= '0;
          raw_cnt     <= '0;
          dwt_addr    <= '0;
          frame_end   <= '0;
        end
        S_CAPTURE: if (all_raw) state <= S_DRAIN;
        S_DRAIN: if (all_dwt && !burst_busy && !burst_start) begin
          state <= S_IDLE;
          done  <= 1'b1;
        end
        default: state <= S_IDLE;
      endcase
      if (state != S_IDLE) begin
        for (int c = 0; c < int'(N_CH); c++) begin
          if (adc_take[c] && capture_en[c]) adm_cnt[c] <= adm_cnt[c] + 1'b1;
          if (raw_take[c])                  raw_cnt[c] <= raw_cnt[c] + 1'b1;
          if (dwt_take[c]) begin
            dwt_addr[c] <= dwt_addr[c] + 1'b1;
            if (dwt_last[c]) frame_end[c] <= 1'b1;
          end
        end
      end
    end
  end
endmodule
