// tb_sd_adder: end-to-end test of the N-digit MRSD adder at its default
// parameters (h = 4, N = 16, carry look-ahead slices).
//
// Each test applies two N-digit operands and checks:
//   - every sum digit s_i against a digit-by-digit integer reference
//     (reference transfer per position, interim sum w_i = x_i + y_i -
//     2^h t_(i+1), s_i = w_i + t_i, s_N = t_N);
//   - every sum digit lies in the digit set;
//   - the value of S equals the value of X plus the value of Y, computed with
//     128-bit integers (digit i weighs 2^(h*i));
//   - the phi outputs equal the reference correction flags.
// Operands are a few fixed patterns (zero, all-maximum, all-minimum, the
// correction cases) followed by random operands biased toward the
// correction cases. The testbench counts how often each mechanism of the
// adder occurred and counts a failure for any that never did: both kinds of
// transfer correction, outgoing transfers of -1, 0 and +1, incoming
// transfers that increment or decrement the interim sum, an increment or
// decrement that reaches the sign bit, and a non-zero extra digit s_N.
// Purely combinational: one operand pair per time unit.
module tb_sd_adder;
  import sd_pkg::*;
  import tb_sd_ref_pkg::*;

  localparam int H = SD_H;
  localparam int N = SD_N;
  localparam int M = (1 << H) - 1;
  localparam int NRAND = 20000;

  logic [N-1:0][H:0] x, y;
  logic [N:0][H:0]   s;
  logic [N-1:0]      phi;

  sd_adder dut (.x(x), .y(y), .s(s), .phi(phi));

  int checks   = 0;
  int failures = 0;

  // Mechanism counters.
  typedef enum int {
    EV_CORR_POS,    // both digits >= 0, guess +1 corrected to 0
    EV_CORR_MIX,    // mixed signs, guess 0 corrected to -1
    EV_T_PLUS,      // outgoing transfer +1
    EV_T_ZERO,      // outgoing transfer 0
    EV_T_MINUS,     // outgoing transfer -1
    EV_INC,         // incoming transfer +1 added to w_i
    EV_DEC,         // incoming transfer -1 added to w_i
    EV_INC_SIGN,    // increment carries into the sign bit (w_i = -1)
    EV_DEC_SIGN,    // decrement borrows into the sign bit (w_i = 0)
    EV_TOP_DIGIT,   // extra sum digit s_N non-zero
    EV_COUNT
  } event_e;
  int events [EV_COUNT];
  string ev_name [EV_COUNT] = '{"correction x,y>=0", "correction mixed signs",
                                "transfer +1", "transfer 0", "transfer -1",
                                "increment", "decrement", "increment into sign",
                                "decrement into sign", "non-zero top digit"};

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input int xd[N], input int yd[N]);
    int t [N+1];
    int wv, ev, sv;
    logic signed [127:0] vx, vy, vs;
    for (int i = 0; i < N; i++) begin
      x[i] = denc(xd[i], H)[H:0];
      y[i] = denc(yd[i], H)[H:0];
    end
    #1;
    t[0] = 0;
    vx = '0;
    vy = '0;
    vs = '0;
    for (int i = 0; i < N; i++) begin
      t[i+1] = ref_transfer(xd[i], yd[i], H);
      wv     = xd[i] + yd[i] - (t[i+1] << H);
      ev     = wv + t[i];
      sv     = dval(32'(s[i]), H);
      checks += 3;
      if (sv != ev) begin
        failures++;
        $display("digit %0d: x=%0d y=%0d t_in=%0d s=%0d expected %0d",
                 i, xd[i], yd[i], t[i], sv, ev);
      end
      if (sv < -M || sv > M) begin
        failures++;
        $display("digit %0d: s=%0d outside the digit set", i, sv);
      end
      if (phi[i] != ref_phi(xd[i], yd[i], H)) begin
        failures++;
        $display("digit %0d: phi=%0b", i, phi[i]);
      end
      if (ref_phi(xd[i], yd[i], H)) begin
        if (xd[i] >= 0 && yd[i] >= 0) events[EV_CORR_POS]++;
        else events[EV_CORR_MIX]++;
      end
      case (t[i+1])
        1:       events[EV_T_PLUS]++;
        0:       events[EV_T_ZERO]++;
        default: events[EV_T_MINUS]++;
      endcase
      if (t[i] == 1) events[EV_INC]++;
      if (t[i] == -1) events[EV_DEC]++;
      if (t[i] == 1 && wv == -1) events[EV_INC_SIGN]++;
      if (t[i] == -1 && wv == 0) events[EV_DEC_SIGN]++;
      vx += 128'(signed'(longint'(xd[i]))) <<< (H * i);
      vy += 128'(signed'(longint'(yd[i]))) <<< (H * i);
      vs += 128'(signed'(longint'(sv))) <<< (H * i);
    end
    sv = dval(32'(s[N]), H);
    vs += 128'(signed'(longint'(sv))) <<< (H * N);
    if (sv != 0) events[EV_TOP_DIGIT]++;
    checks += 2;
    if (sv != t[N]) begin
      failures++;
      $display("top digit: s=%0d expected %0d", sv, t[N]);
    end
    if (vs != vx + vy) begin
      failures++;
      $display("value: S=%0d, X+Y=%0d", vs, vx + vy);
    end
  endtask

  initial begin
    int xd [N];
    int yd [N];
    // Fixed patterns.
    for (int p = 0; p < 8; p++) begin
      for (int i = 0; i < N; i++) begin
        case (p)
          0: begin xd[i] = 0;  yd[i] = 0;  end
          1: begin xd[i] = M;  yd[i] = M;  end
          2: begin xd[i] = -M; yd[i] = -M; end
          3: begin xd[i] = M;  yd[i] = -M; end
          4: begin xd[i] = (i % 2 == 0) ? 0 : 1;  yd[i] = (i % 3 == 0) ? 1 : 0; end
          5: begin xd[i] = 0;  yd[i] = -M; end
          6: begin xd[i] = -M; yd[i] = 0;  end
          default: begin xd[i] = (i % 2 == 0) ? 1 : M; yd[i] = (i % 2 == 0) ? -2 : 1; end
        endcase
      end
      apply(xd, yd);
    end
    // Random operands.
    for (int r = 0; r < NRAND; r++) begin
      for (int i = 0; i < N; i++) begin
        xd[i] = rand_digit(H);
        yd[i] = rand_digit(H);
      end
      apply(xd, yd);
    end
    for (int e = 0; e < int'(EV_COUNT); e++) begin
      $display("%-24s %0d", ev_name[e], events[e]);
      checks++;
      if (events[e] == 0) begin
        failures++;
        $display("mechanism never exercised: %s", ev_name[e]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule : tb_sd_adder
