// tb_crossbar: checks the crossbar with random one-to-one connections.
// Every cycle the testbench draws a random partial permutation: each
// input drives at most one output and each output gets at most one input,
// as the arbiter guarantees. Valid inputs carry random data, sop and their
// output number. One cycle later each output must show exactly the data of
// the input aimed at it, or nothing if no input was.
// Sizes are the published 16 ports. The parallel multiplexer and its one
// cycle of latency are this design's own choice.
// A watchdog stops the run after 200000 time units (clock period 10).
module tb_crossbar;
  localparam int NP = 16, PW = 4, HW = 36, CYC = 3000;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [NP-1:0] in_valid = '0, in_sop = '0;
  logic [NP-1:0][HW-1:0] in_data = '0;
  logic [NP-1:0][PW-1:0] in_port = '0;
  logic [NP-1:0] out_valid, out_sop;
  logic [NP-1:0][HW-1:0] out_data;
  crossbar #(.N_PORTS(NP)) dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %0t %s", $time, s); end
  endtask

  bit exp_v[NP], exp_s[NP];
  logic [HW-1:0] exp_d[NP];

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < CYC; c++) begin
      int perm[NP];
      @(negedge clk);
      // outputs of the previous cycle's inputs
      if (c > 0)
        for (int o = 0; o < NP; o++) begin
          chk(out_valid[o] == exp_v[o], $sformatf("out_valid[%0d]", o));
          if (exp_v[o]) begin
            chk(out_sop[o] == exp_s[o], $sformatf("out_sop[%0d]", o));
            chk(out_data[o] == exp_d[o], $sformatf("out_data[%0d]", o));
          end
        end
      foreach (perm[k]) perm[k] = k;
      perm.shuffle();
      foreach (exp_v[o]) exp_v[o] = 0;
      for (int i = 0; i < NP; i++) begin
        in_valid[i] = $urandom_range(99) < 70;
        in_sop[i]   = $urandom_range(1);
        in_data[i]  = {$urandom, $urandom};
        in_port[i]  = PW'(perm[i]);
        if (in_valid[i]) begin
          exp_v[perm[i]] = 1; exp_s[perm[i]] = in_sop[i]; exp_d[perm[i]] = in_data[i];
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
