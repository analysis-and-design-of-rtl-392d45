// Behavioural model of the external 256-point streaming IFFT core, for
// simulation only (not synthesizable: real arithmetic and queues).
//
// It collects NFFT input bins starting at in_sop, computes
// x[n] = (1/NFFT) * sum_k X[k] * exp(+j*2*pi*k*n/NFFT) in double precision,
// rounds to Q2.14 and streams the NFFT results out, one per clock, starting
// LATENCY clocks after the last input bin. A new symbol may be accepted
// while the previous one is still being sent (pipelined, streaming I/O).
module ifft256_model
  import ofdm_tx_pkg::*;
#(
  parameter int N       = 256,
  parameter int LATENCY = 8
) (
  input  logic clk,
  input  logic in_valid,
  input  logic in_sop,
  input  iq_t  in,
  output logic out_valid,
  output iq_t  out
);
  real  xr [N], xi [N];
  int   cnt = -1;
  iq_t  q [$];
  int   start_q [$];
  int   cyc = 0;
  localparam real PI = 3.14159265358979323846;

  function automatic sample_t to_q214(real v);
    real r = v * 16384.0;
    r = (r >= 0.0) ? $floor(r + 0.5) : -$floor(-r + 0.5);
    if (r > 32767.0) r = 32767.0;
    if (r < -32768.0) r = -32768.0;
    return sample_t'(int'(r));
  endfunction

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (in_valid) begin
      automatic int idx = in_sop ? 0 : cnt + 1;
      xr[idx] = real'(in.i) / 16384.0;
      xi[idx] = real'(in.q) / 16384.0;
      cnt = idx;
      if (idx == N - 1) begin
        for (int n = 0; n < N; n++) begin
          automatic real sr = 0.0, si = 0.0;
          for (int k = 0; k < N; k++) begin
            automatic real a = 2.0 * PI * real'((k * n) % N) / real'(N);
            sr += xr[k] * $cos(a) - xi[k] * $sin(a);
            si += xr[k] * $sin(a) + xi[k] * $cos(a);
          end
          q.push_back('{i: to_q214(sr / real'(N)), q: to_q214(si / real'(N))});
        end
        start_q.push_back(cyc + LATENCY);
      end
    end
  end

  // output side: one sample per clock once a symbol's start time is reached
  int sent = 0;
  always @(posedge clk) begin
    out_valid <= 1'b0;
    if (start_q.size() > 0 && cyc >= start_q[0] && q.size() > 0) begin
      out_valid <= 1'b1;
      out       <= q.pop_front();
      sent++;
      if (sent == N) begin
        sent = 0;
        void'(start_q.pop_front());
      end
    end
  end
endmodule
