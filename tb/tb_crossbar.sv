// tb_crossbar: random inputs, selects and enables; every output must equal
// the selected input when enabled and zero otherwise.
module tb_crossbar;
  import noc_pkg::*;
  int checks = 0, failures = 0;

  flit_t [3:0]       fin, fout;
  logic  [3:0][1:0]  sel;
  logic  [3:0]       en;

  crossbar dut (.flit_in(fin), .sel(sel), .en(en), .flit_out(fout));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      for (int i = 0; i < 4; i++) fin[i] = flit_t'({$urandom, $urandom});
      sel = 8'($urandom);
      en  = 4'($urandom);
      #1;
      for (int o = 0; o < 4; o++) begin
        flit_t exp;
        exp = en[o] ? fin[sel[o]] : '0;
        checks++;
        if (fout[o] !== exp) begin
          failures++;
          $display("FAIL t=%0d out %0d: got %h expected %h", t, o, fout[o], exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
