// tb_sfl: self-checking test of the self-feedback logic unit.
//
// Three configurations of ten candidates over seven nets, chosen so that all
// ten operations and many net pairs occur. Random net responses are applied
// under every configuration and each output bit is compared with a reference
// evaluation written out here with plain boolean operators.
module tb_sfl;
  import bist_pkg::*;

  localparam int unsigned N_CSR   = 10;
  localparam int unsigned N_NETS  = 7;
  localparam int unsigned NUM_CFG = 3;

  typedef fb_cand_t [NUM_CFG-1:0][N_CSR-1:0] cfg_tab_t;

  function automatic cfg_tab_t make_tab();
    cfg_tab_t t;
    for (int c = 0; c < NUM_CFG; c++)
      for (int i = 0; i < N_CSR; i++) begin
        t[c][i].op = fb_op_e'((i + 3 * c) % 10);
        t[c][i].a  = NET_IDX_W'((3 * i + c) % N_NETS);
        t[c][i].b  = NET_IDX_W'((5 * i + 2 * c + 1) % N_NETS);
      end
    return t;
  endfunction

  localparam cfg_tab_t TAB = make_tab();

  logic [N_NETS-1:0] nets;
  logic [CFG_W-1:0]  cfg_sel;
  logic [N_CSR-1:0]  fb_pattern;
  int checks = 0, failures = 0;

  sfl #(.N_CSR(N_CSR), .N_NETS(N_NETS), .NUM_CFG(NUM_CFG), .CFG(TAB)) dut (.*);

  function automatic logic ref_bit(int c, int i, logic [N_NETS-1:0] n);
    int op = (i + 3 * c) % 10;
    logic x = n[(3 * i + c) % N_NETS];
    logic y = n[(5 * i + 2 * c + 1) % N_NETS];
    case (op)
      0: return x;
      1: return !x;
      2: return 1'b1;
      3: return 1'b0;
      4: return x && y;
      5: return !(x && y);
      6: return x || y;
      7: return !(x || y);
      8: return x != y;
      default: return x == y;
    endcase
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 300; k++) begin
      nets = N_NETS'($urandom);
      for (int c = 0; c < NUM_CFG; c++) begin
        cfg_sel = CFG_W'(c);
        #1;
        for (int i = 0; i < N_CSR; i++) begin
          checks++;
          if (fb_pattern[i] !== ref_bit(c, i, nets)) begin
            failures++;
            if (failures < 10)
              $display("FAIL cfg %0d bit %0d nets %b: got %b", c, i, nets, fb_pattern[i]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
