// wallace_size_check: testbench helper that checks one wallace_encoder of
// size N on its own. Up to 2^16 input words it tries them all; above that it
// tries every clean thermometer code, every single-bubble code, and NRAND
// random words. Each expected value is a bit-by-bit ones count. When done it
// raises done and reports its check and failure counts on its outputs.
module wallace_size_check #(
  parameter int unsigned N     = 3,
  parameter int unsigned NRAND = 20000
) (
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int unsigned NIN = 2**N - 1;

  logic [NIN-1:0] therm;
  logic [N-1:0]   bin;

  wallace_encoder #(.N(N)) dut (.therm_i(therm), .bin_o(bin));

  function automatic int unsigned ones(logic [NIN-1:0] w);
    int unsigned n = 0;
    for (int i = 0; i < NIN; i++) if (w[i]) n++;
    return n;
  endfunction

  task automatic apply(input logic [NIN-1:0] w);
    therm = w;
    #1;
    checks++;
    if (int'(bin) != int'(ones(w))) begin
      failures++;
      if (failures < 10) $display("FAIL N=%0d therm=%b bin=%0d expected %0d", N, w, bin, ones(w));
    end
  endtask

  initial begin
    done = 1'b0;
    checks = 0;
    failures = 0;
    therm = '0;
    if (NIN <= 16) begin
      for (longint w = 0; w < (longint'(1) << NIN); w++) apply(NIN'(w));
    end else begin
      for (int level = 0; level <= NIN; level++) begin
        logic [NIN-1:0] clean;
        clean = '0;
        for (int i = 0; i < level; i++) clean[i] = 1'b1;
        apply(clean);
        for (int b = 0; b < NIN; b++) begin
          logic [NIN-1:0] bub;
          bub = clean;
          bub[b] = ~bub[b];
          apply(bub);
        end
      end
      for (int r = 0; r < NRAND; r++) begin
        logic [NIN-1:0] w;
        for (int i = 0; i < NIN; i++) w[i] = 1'($urandom);
        apply(w);
      end
    end
    done = 1'b1;
  end
endmodule
