// tb_fft32_io: end-to-end test of the 32-point FFT at its default size.
//
// Streams NFRAMES frames back to back into datain whenever in_ready is
// high: a ramp 1.0, 2.0, ..., 32.0 (large enough that X(0) saturates), a
// frame of all 1.0, a single impulse, and then random frames of small and
// of full-scale amplitude. Every output is compared bit for bit with the
// fixed-point reference model of fft_ref_pkg and, where no saturation
// occurs, with a floating-point DFT within a tolerance. The test also
// checks the output order (out_idx), the 48-clock frame period and the
// 24-clock latency from the last sample to X(0), and it counts that each
// mechanism happened: the LOAD and READ phases, saturation of a result,
// and a result being sent while the next frame is loading.
module tb_fft32_io;
  import fft_ref_pkg::*;

  localparam int NFRAMES  = 12;
  localparam int LATENCY  = 24;
  localparam int PERIOD   = 48;

  logic        clk = 1'b0;
  logic        rst = 1'b1;
  logic [15:0] datain = '0;
  logic [15:0] data_outre, data_outim;
  logic        in_ready, out_valid;
  logic [4:0]  out_idx;

  int checks = 0;
  int failures = 0;

  fft32_io dut (
    .clk        (clk),
    .rst        (rst),
    .datain     (datain),
    .data_outre (data_outre),
    .data_outim (data_outim),
    .in_ready   (in_ready),
    .out_valid  (out_valid),
    .out_idx    (out_idx)
  );

  always #5 clk = ~clk;

  longint frames [NFRAMES][NPT];
  longint cycle = 0;
  longint last_sample_cycle [NFRAMES];
  longint first_out_cycle [NFRAMES];

  // mechanism counters
  int n_load_phases = 0, n_read_phases = 0, n_saturated = 0, n_overlap = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  function automatic longint s16(input logic [15:0] v);
    return longint'($signed(v));
  endfunction

  // build the stimulus
  initial begin
    for (int f = 0; f < NFRAMES; f++)
      for (int n = 0; n < NPT; n++) begin
        unique case (f)
          0: frames[f][n] = (n + 1) * 256;            // ramp 1..32
          1: frames[f][n] = 256;                      // all 1.0
          2: frames[f][n] = (n == 3) ? 256 * 5 : 0;   // impulse
          default:
            if (f % 2 == 1)
              frames[f][n] = longint'($signed(16'($urandom)));   // full scale
            else
              frames[f][n] = longint'($signed(16'($urandom))) >>> 4;  // |x| < 8
        endcase
      end
  end

  always @(posedge clk) cycle <= cycle + 1;

  // drive inputs
  int in_frame = 0, in_pos = 0;
  logic in_ready_q = 1'b0;
  always @(posedge clk) begin
    if (!rst) begin
      if (in_ready) begin
        if (in_pos == NPT - 1) last_sample_cycle[in_frame] = cycle;
        if (in_pos == NPT - 1) begin
          in_pos = 0;
          in_frame++;
        end else begin
          in_pos++;
        end
      end
      if (in_ready && !in_ready_q) n_load_phases++;
      if (!in_ready && in_ready_q) n_read_phases++;
      in_ready_q <= in_ready;
      if (in_ready && out_valid) n_overlap++;
    end
  end
  always_comb datain = (in_frame < NFRAMES) ? 16'(frames[in_frame][in_pos]) : 16'h0;

  // check outputs
  int out_frame = 0, out_pos = 0;
  ref_c_t yref [NPT];
  real    yr [NPT], yi [NPT];
  always @(posedge clk) begin
    if (!rst && out_valid && out_frame < NFRAMES) begin
      longint sum_abs = 0;
      longint er, ei;
      real tol;
      if (out_pos == 0) begin
        first_out_cycle[out_frame] = cycle;
        fft_fixed(frames[out_frame], yref);
        dft(frames[out_frame], yr, yi);
        check(cycle - last_sample_cycle[out_frame] == LATENCY,
              $sformatf("frame %0d latency %0d", out_frame, cycle - last_sample_cycle[out_frame]));
        if (out_frame > 0)
          check(first_out_cycle[out_frame] - first_out_cycle[out_frame-1] == PERIOD,
                $sformatf("frame %0d period", out_frame));
      end
      check(out_idx == 5'(out_pos), $sformatf("frame %0d out_idx %0d exp %0d", out_frame, out_idx, out_pos));
      er = sat16(yref[out_pos].re);
      ei = sat16(yref[out_pos].im);
      if (er != yref[out_pos].re || ei != yref[out_pos].im) n_saturated++;
      check(s16(data_outre) == er && s16(data_outim) == ei,
            $sformatf("frame %0d X(%0d) = %0d,%0d exp %0d,%0d", out_frame, out_pos,
                      s16(data_outre), s16(data_outim), er, ei));
      // independent floating-point check where nothing saturated
      for (int n = 0; n < NPT; n++) sum_abs += (frames[out_frame][n] < 0) ? -frames[out_frame][n] : frames[out_frame][n];
      tol = 0.02 * real'(sum_abs) / 256.0 + 0.1;
      if (er == yref[out_pos].re && ei == yref[out_pos].im) begin
        check((real'(s16(data_outre)) / 256.0 - yr[out_pos] < tol) &&
              (yr[out_pos] - real'(s16(data_outre)) / 256.0 < tol) &&
              (real'(s16(data_outim)) / 256.0 - yi[out_pos] < tol) &&
              (yi[out_pos] - real'(s16(data_outim)) / 256.0 < tol),
              $sformatf("frame %0d X(%0d) far from DFT %f,%f", out_frame, out_pos, yr[out_pos], yi[out_pos]));
      end
      if (out_pos == NPT - 1) begin
        out_pos = 0;
        out_frame++;
      end else begin
        out_pos++;
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    wait (out_frame == NFRAMES);
    repeat (2) @(posedge clk);
    check(n_load_phases >= NFRAMES, $sformatf("LOAD phases seen: %0d", n_load_phases));
    check(n_read_phases >= NFRAMES, $sformatf("READ phases seen: %0d", n_read_phases));
    check(n_saturated > 0, "no result saturated");
    check(n_overlap > 0, "output never overlapped loading");
    $display("mechanisms: load=%0d read=%0d saturated=%0d overlap=%0d",
             n_load_phases, n_read_phases, n_saturated, n_overlap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (PERIOD * (NFRAMES + 4)) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
