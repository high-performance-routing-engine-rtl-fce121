// tb_central_arbiter: checks the central arbiter against a behavioural
// model of residual request counts and 3-iteration iSLIP.
// A slot is 12 cycles with slot_tick in phase 0. Each slot the testbench
// sends a random request vector per input, never more than RF_LEN
// requests outstanding per input/output pair, as the input buffers
// guarantee. The model adds the requests, runs the iSLIP iterations with
// its own round-robin pointers, and takes the served requests off. In the
// last phase of the slot the arbiter's grants must equal the model's, no
// output may be granted twice, and a request left unserved must still be
// granted in a later slot (all requests are drained at the end).
// Runs reduced (4 ports) at the published request FIFO length of 2 and 3
// iterations; the model and the request mix are this testbench's own.
// A watchdog stops the run after 400000 time units (clock period 10).
module tb_central_arbiter;
  localparam int NP = 4, L = 2, IT = 3, SL = 12, PW = 2, SLOTS = 2000;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic slot_tick = 0;
  logic [NP-1:0][NP-1:0] req_vec = '0;
  logic [NP-1:0] grant_valid;
  logic [NP-1:0][PW-1:0] grant_port;
  central_arbiter #(.N_PORTS(NP), .RF_LEN(L), .ITER(IT), .SLOT_CYCLES(SL)) dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %0t %s", $time, s); end
  endtask

  int pend[NP][NP], outst[NP][NP];
  int gptr[NP], aptr[NP], match[NP];
  int n_multi_iter = 0;

  task automatic model_slot();
    bit in_m[NP], out_m[NP];
    foreach (in_m[i]) begin in_m[i] = 0; out_m[i] = 0; match[i] = -1; end
    for (int it = 0; it < IT; it++) begin
      int gsel[NP];
      for (int o = 0; o < NP; o++) begin
        gsel[o] = -1;
        if (!out_m[o])
          for (int k = 0; k < NP; k++) begin
            int i;
            i = (gptr[o] + k) % NP;
            if (gsel[o] < 0 && !in_m[i] && pend[i][o] > 0) gsel[o] = i;
          end
      end
      for (int i = 0; i < NP; i++) if (!in_m[i]) begin
        int acc;
        acc = -1;
        for (int k = 0; k < NP; k++) begin
          int o;
          o = (aptr[i] + k) % NP;
          if (acc < 0 && gsel[o] == i) acc = o;
        end
        if (acc >= 0) begin
          in_m[i] = 1; out_m[acc] = 1; match[i] = acc;
          if (it > 0) n_multi_iter++;
          if (it == 0) begin gptr[acc] = (i + 1) % NP; aptr[i] = (acc + 1) % NP; end
        end
      end
    end
    for (int i = 0; i < NP; i++) if (match[i] >= 0) pend[i][match[i]]--;
  endtask

  initial begin
    foreach (pend[i, j]) begin pend[i][j] = 0; outst[i][j] = 0; end
    foreach (gptr[i]) begin gptr[i] = 0; aptr[i] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int s = 0; s < SLOTS; s++) begin
      int density;
      density = (s < SLOTS - 20) ? ((s / 200) % 2 ? 90 : 40) : 0;
      // phase 0: requests
      @(negedge clk);
      slot_tick = 1;
      for (int i = 0; i < NP; i++)
        for (int j = 0; j < NP; j++) begin
          req_vec[i][j] = (outst[i][j] < L) && ($urandom_range(99) < density);
          if (req_vec[i][j]) begin pend[i][j]++; outst[i][j]++; end
        end
      model_slot();
      @(negedge clk);
      slot_tick = 0;
      req_vec = $urandom;            // ignored outside phase 0
      repeat (SL - 3) @(negedge clk);
      // last phase: grants of this slot are out
      begin
        bit used[NP];
        foreach (used[o]) used[o] = 0;
        for (int i = 0; i < NP; i++) begin
          chk(grant_valid[i] == (match[i] >= 0), $sformatf("slot %0d grant_valid[%0d]", s, i));
          if (match[i] >= 0) begin
            chk(grant_port[i] == PW'(match[i]), $sformatf("slot %0d grant_port[%0d]", s, i));
            chk(!used[match[i]], "output granted twice");
            used[match[i]] = 1;
            outst[i][match[i]]--;
          end
        end
      end
      @(negedge clk);
      req_vec = '0;
    end
    foreach (outst[i, j]) chk(outst[i][j] == 0, "every request granted in the end");
    chk(n_multi_iter > 0, "a match in a later iteration");
    $display("later-iteration matches: %0d", n_multi_iter);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #400000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
