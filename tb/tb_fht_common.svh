// Shared testbench helpers for the FHT processor: reference transform and
// input generation. Expects localparams N (points) and DW (sample width).

// Direct O(N^2) discrete Hartley transform in double precision.
function automatic void dht(input real xin[N], output real h[N]);
  real pi2 = 2.0 * 3.14159265358979323846;
  for (int k = 0; k < N; k++) begin
    real acc = 0.0;
    for (int n = 0; n < N; n++) begin
      real a = pi2 * real'((n * k) % N) / real'(N);
      acc += xin[n] * ($cos(a) + $sin(a));
    end
    h[k] = acc;
  end
endfunction

// Test inputs. kind selects the amplitude range, and with it the block
// floating point decisions: 0 impulse, 1 small noise, 2 medium, 3 full scale,
// 4 constant, others alternate sign at full scale.
function automatic void make_input(input int kind, output logic [DW-1:0] xs[N]);
  for (int n = 0; n < N; n++) begin
    int v;
    case (kind)
      0: v = (n == 1) ? 1000 : 0;
      1: v = int'($urandom_range(0, 2 * 200)) - 200;
      2: v = int'($urandom_range(0, 2 * (1 << (DW - 3)))) - (1 << (DW - 3));
      3: v = int'($urandom_range(0, 2 * ((1 << (DW - 1)) - 1))) - ((1 << (DW - 1)) - 1);
      4: v = (1 << (DW - 2)) - 1;
      default: v = (n % 2 == 0) ? ((1 << (DW - 1)) - 1) : -((1 << (DW - 1)) - 1);
    endcase
    xs[n] = DW'(v);
  end
endfunction

// Direct real-input DFT F(k) = sum_n x[n] exp(-2*pi*i*n*k/N), packed as
// X[k] = Re F(k) for k = 0..N/2 and X[N-k] = Im F(k) for k = 1..N/2-1.
function automatic void rdft(input real xin[N], output real xo[N]);
  real pi2 = 2.0 * 3.14159265358979323846;
  for (int k = 0; k <= N / 2; k++) begin
    real re = 0.0, im = 0.0;
    for (int n = 0; n < N; n++) begin
      real a = pi2 * real'((n * k) % N) / real'(N);
      re += xin[n] * $cos(a);
      im -= xin[n] * $sin(a);
    end
    xo[k] = re;
    if (k > 0 && k < N / 2) xo[N - k] = im;
  end
endfunction
