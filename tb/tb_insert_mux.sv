// tb_insert_mux -- drives insert_mux (N = 63) with random bytes and at most one replace strobe,
// and checks that the output is the bypass byte with no strobe and the strobed channel's byte
// otherwise, for every channel position.
`timescale 1ns/1ps
module tb_insert_mux;
  localparam int N = 63;
  logic [7:0]   bypass_data;
  logic [N-1:0] replace;
  logic [7:0]   insert_data [N];
  logic [7:0]   dout;
  int checks = 0, failures = 0;

  insert_mux #(.N(N)) dut (.bypass_data, .replace, .insert_data, .dout);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      int sel;
      logic [7:0] exp;
      bypass_data = 8'($urandom);
      foreach (insert_data[i]) insert_data[i] = 8'($urandom);
      replace = '0;
      sel = (t < N) ? t : int'($urandom_range(0, 2 * N - 1));
      exp = bypass_data;
      if (sel < N) begin
        replace[sel] = 1'b1;
        exp = insert_data[sel];
      end
      #1;
      checks++;
      if (dout !== exp) begin
        failures++;
        $display("FAIL t=%0d sel=%0d dout=%h expected %h", t, sel, dout, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
