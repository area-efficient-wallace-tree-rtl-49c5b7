// wallace_encoder_tb: end-to-end, self-checking test of the 15:4 Wallace-tree
// encoder at its default size (N = 4), driven both directly and through a
// behavioural flash ADC front end (resistor ladder and comparators).
//
// Phases, each counted as a mechanism that must occur at least once:
//   exhaustive   every one of the 2^15 input words; the output must be the
//                number of ones, counted here bit by bit
//   clean_code   an input voltage ramp through the front-end model; the
//                output must be the ideal ADC code floor(vin * 16 / VREF),
//                limited to 15
//   full_scale   vin above the top tap: all ones, output 15
//   zero_scale   vin below the lowest tap: all zeros, output 0
//   bubble       one comparator output of a clean code inverted (a hole below
//                the transition or a stray one above it); the output must be
//                the ones count and stay within one code of the true level,
//                which is the global bubble suppression of a ones counter.
//                local_wild counts the bubbles for which reading the highest
//                set bit, as a transition-detecting encoder does, would be
//                off by more than one code
// The encoder is combinational: every result is sampled 1 ns after its input
// changes, which is the latency being checked.
module wallace_encoder_tb;
  localparam int unsigned N     = 4;
  localparam int unsigned NIN   = 2**N - 1;
  localparam int unsigned LEVELS = 2**N;
  localparam real         VREF  = 1.0;

  logic [NIN-1:0] therm_direct, therm_model, therm;
  logic           use_model;
  logic [N-1:0]   bin;
  real            vin;
  logic           bubble_en;
  int unsigned    bubble_idx;

  int checks = 0, failures = 0;
  int n_exhaustive = 0, n_clean = 0, n_full = 0, n_zero = 0, n_bubble = 0, n_local_wild = 0;

  flash_frontend_model #(.N(N), .VREF(VREF)) u_fe (
    .vin(vin), .bubble_en(bubble_en), .bubble_idx(bubble_idx), .therm(therm_model)
  );

  always_comb therm = use_model ? therm_model : therm_direct;

  wallace_encoder dut (.therm_i(therm), .bin_o(bin));

  function automatic int unsigned ones(logic [NIN-1:0] w);
    int unsigned n = 0;
    for (int i = 0; i < NIN; i++) if (w[i]) n++;
    return n;
  endfunction

  function automatic int unsigned top_one(logic [NIN-1:0] w);
    int unsigned t = 0;
    for (int i = 0; i < NIN; i++) if (w[i]) t = i + 1;
    return t;
  endfunction

  task automatic check(input int unsigned expected, input string what);
    checks++;
    if (int'(bin) != int'(expected)) begin
      failures++;
      if (failures < 20)
        $display("FAIL %s: therm=%b bin=%0d expected %0d", what, therm, bin, expected);
    end
  endtask

  initial begin : watchdog
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    use_model = 1'b0;
    bubble_en = 1'b0;
    bubble_idx = 0;
    vin = 0.0;
    therm_direct = '0;

    // exhaustive: all input words
    for (int w = 0; w < 2**NIN; w++) begin
      therm_direct = NIN'(w);
      #1;
      check(ones(therm_direct), "exhaustive");
      n_exhaustive++;
    end

    // clean codes from a voltage ramp through the front-end model
    use_model = 1'b1;
    for (int s = 0; s < 10 * LEVELS; s++) begin
      int unsigned level;
      vin = VREF * (real'(s) + 0.5) / real'(10 * LEVELS);
      level = int'($floor(vin * real'(LEVELS) / VREF));
      if (level > LEVELS - 1) level = LEVELS - 1;
      #1;
      check(level, "clean_code");
      n_clean++;
      if (level == LEVELS - 1) n_full++;
      if (level == 0) n_zero++;
    end
    vin = 1.5 * VREF;  // over range
    #1;
    check(LEVELS - 1, "over_range");
    n_full++;
    vin = -0.1 * VREF;  // under range
    #1;
    check(0, "under_range");
    n_zero++;

    // single bubbles at every level and every comparator
    bubble_en = 1'b1;
    for (int level = 0; level < LEVELS; level++) begin
      for (int b = 0; b < NIN; b++) begin
        int unsigned expected;
        bubble_idx = b;
        vin = VREF * (real'(level) + 0.5) / real'(LEVELS);
        // a hole takes one away, a stray one adds one
        expected = (b < level) ? level - 1 : level + 1;
        #1;
        check(expected, "bubble");
        checks++;
        if ((int'(bin) - level > 1) || (level - int'(bin) > 1)) begin
          failures++;
          $display("FAIL bubble moved the code by more than one: level %0d bin %0d", level, bin);
        end
        if (b != level - 1 && b != level) begin
          n_bubble++;
          if ((int'(top_one(therm)) - level > 1) || (level - int'(top_one(therm)) > 1))
            n_local_wild++;
        end
      end
    end
    bubble_en = 1'b0;

    $display("mechanisms: exhaustive=%0d clean_code=%0d full_scale=%0d zero_scale=%0d bubble=%0d local_wild=%0d",
             n_exhaustive, n_clean, n_full, n_zero, n_bubble, n_local_wild);
    checks++;
    if (n_exhaustive == 0 || n_clean == 0 || n_full == 0 || n_zero == 0 || n_bubble == 0 || n_local_wild == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
