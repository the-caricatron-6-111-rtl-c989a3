// Testbench for top_mux: for every master state, checks which requester
// drives each RAM address, the object RAM write enable, which clock each
// image RAM gets, and the pixel handed to the VGA (luminance or thresholded
// edge map).
module tb_top_mux;
  import caricatron_pkg::*;
  master_state_t state;
  logic clk27 = 0, clk31 = 0;
  logic [7:0]  thresh;
  logic [16:0] vga_addr, vid_addr, pay, pae, lum_addr, edge_addr;
  logic        lum_clk, edge_clk, proc_we, obj_we;
  logic [7:0]  lum_q, vga_data;
  logic [15:0] edge_q;
  logic [10:0] pao, pra, obj_addr;
  logic [67:0] pdin, obj_din;
  int checks = 0, failures = 0;

  top_mux dut (.state, .clk27, .clk31, .thresh, .vga_addr, .vid_addr, .proc_addr_y(pay),
    .proc_addr_e(pae), .lum_addr, .edge_addr, .lum_clk, .edge_clk, .lum_q, .edge_q, .vga_data,
    .proc_addr_o(pao), .print_addr(pra), .proc_we, .proc_din(pdin), .obj_addr, .obj_we, .obj_din);

  task automatic check(input logic c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 7; s++) begin
      for (int r = 0; r < 20; r++) begin
        logic e_lum, e_edge;
        logic [16:0] exp_l, exp_e;
        logic [7:0]  exp_v;
        state = master_state_t'(s);
        vga_addr = 17'($urandom); vid_addr = 17'($urandom);
        pay = 17'($urandom); pae = 17'($urandom);
        pao = 11'($urandom); pra = 11'($urandom); proc_we = 1'($urandom);
        pdin = {$urandom, $urandom, 4'($urandom)};
        lum_q = 8'($urandom); edge_q = 16'($urandom); thresh = 8'($urandom);
        if (r % 3 == 0) edge_q = {1'b0, 15'(thresh) + 15'd1};
        if (r % 3 == 1) edge_q = {1'b0, 7'd0, thresh};
        clk27 = 1'($urandom); clk31 = ~clk27;
        #1;
        e_lum  = (s == 2);
        e_edge = (s == 4);
        exp_l = (s == 1) ? vid_addr : e_lum ? vga_addr : pay;
        exp_e = e_edge ? vga_addr : pae;
        exp_v = e_edge ? ((!edge_q[15] && edge_q > 16'(thresh)) ? 8'hFF : 8'h00) : lum_q;
        check(lum_addr == exp_l, $sformatf("lum_addr in state %0d", s));
        check(edge_addr == exp_e, $sformatf("edge_addr in state %0d", s));
        check(lum_clk == (e_lum ? clk31 : clk27), "lum clock");
        check(edge_clk == (e_edge ? clk31 : clk27), "edge clock");
        check(vga_data == exp_v, $sformatf("vga data in state %0d", s));
        check(obj_addr == ((s == 6) ? pra : pao), "object address");
        check(obj_we == ((s == 6) ? 1'b0 : proc_we), "object write enable");
        check(obj_din == pdin, "object data");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
