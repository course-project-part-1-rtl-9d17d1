// tb_input_mux: self-checking test of the 4-way one-hot input MUX.
//
// For random flits on all inputs, each one-hot select must pass exactly its
// input, and an all-zero select must give an all-zero output.
module tb_input_mux;
  import noc_pkg::*;
  localparam int unsigned N = NUM_VC;
  localparam int unsigned W = FLIT_W;

  logic [N-1:0][W-1:0] din;
  logic [N-1:0]        sel;
  logic [W-1:0]        dout;

  input_mux #(.N(N), .W(W)) dut (.din, .sel, .dout);

  int checks = 0, failures = 0;

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      for (int k = 0; k < N; k++) din[k] = W'($urandom);
      for (int k = 0; k <= N; k++) begin
        sel = (k < N) ? N'(1 << k) : '0;
        #1;
        checks++;
        if (dout !== ((k < N) ? din[k] : '0)) begin
          failures++;
          $display("FAIL: sel=%b dout=%h", sel, dout);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
