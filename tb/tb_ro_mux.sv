// tb_ro_mux: 300-input RO multiplexer. Random input patterns and random
// select values, including values past the last RO (output must be low).
`timescale 1ps / 1ps
module tb_ro_mux;
  localparam int N = 300;
  localparam int SW = $clog2(N);
  logic [N-1:0] ro;
  logic [SW-1:0] sel;
  logic y;
  int checks = 0, failures = 0;

  ro_mux #(.N_RO(N)) dut (.ro(ro), .sel(sel), .y(y));

  initial begin
    #1_000_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4000; i++) begin
      for (int b = 0; b < N; b++) ro[b] = 1'($urandom);
      sel = (i < N) ? SW'(i) : SW'($urandom);
      #1;
      checks++;
      if (int'(sel) < N) begin
        if (y !== ro[sel]) begin failures++; $display("sel=%0d y=%b exp=%b", sel, y, ro[sel]); end
      end else if (y !== 1'b0) begin
        failures++; $display("sel=%0d out of range but y=1", sel);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
