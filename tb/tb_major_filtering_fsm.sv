// Testbench for major_filtering_fsm with scripted processing modules: checks
// that the edge-RAM port follows the active module (convolution, search,
// curve follower), that a convolution request produces conv_go and a done
// pulse, that every extracted curve is written to the next object RAM word
// followed by a resume of the search, that an exhausted search ends line
// detection, and that with MAX_OBJECTS = 3 detection stops at a full object
// RAM.
module tb_major_filtering_fsm;
  import caricatron_pkg::*;
  logic clk = 0, reset = 1, start_conv = 0, start_curves = 0, conv_done_out, curves_done;
  logic conv_go, conv_done = 0, find_go, find_resume, find_found = 0, find_exhausted = 0;
  logic ext_go, ext_done = 0, conv_we, ext_we, ram_e_we, ram_o_we;
  logic [16:0] conv_a, find_a, ext_a, ram_e_addr;
  logic [15:0] conv_d, ext_d, ram_e_wdata;
  curve_t ext_curve, ram_o_data;
  logic [10:0] ram_o_addr;
  logic [11:0] num_objects;
  curve_t objs [int];
  int checks = 0, failures = 0, n_go = 0, n_res = 0, n_ext = 0, n_cd = 0, n_ld = 0;

  major_filtering_fsm #(.MAX_OBJECTS(3)) dut (.clk, .reset, .start_conv, .start_curves,
    .conv_done_out, .curves_done, .conv_go, .conv_done, .conv_e_addr(conv_a), .conv_e_we(conv_we),
    .conv_e_wdata(conv_d), .find_go, .find_resume, .find_found, .find_exhausted,
    .find_e_addr(find_a), .ext_go, .ext_done, .ext_curve, .ext_e_addr(ext_a), .ext_e_we(ext_we),
    .ext_e_wdata(ext_d), .ram_e_addr, .ram_e_we, .ram_e_wdata, .ram_o_addr, .ram_o_we,
    .ram_o_data, .num_objects);

  always #5 clk = ~clk;
  always @(posedge clk) if (!reset) begin
    if (ram_o_we) objs[int'(ram_o_addr)] = ram_o_data;
    n_go  <= n_go + int'(conv_go) + int'(find_go);
    n_res <= n_res + int'(find_resume);
    n_ext <= n_ext + int'(ext_go);
    n_cd  <= n_cd + int'(conv_done_out);
    n_ld  <= n_ld + int'(curves_done);
  end

  task automatic check(input logic c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask
  task automatic pulse(ref logic s);
    @(negedge clk); s = 1; @(negedge clk); s = 0; @(negedge clk);
  endtask
  task automatic port_is(input int who);
    conv_a = 17'($urandom); find_a = 17'($urandom); ext_a = 17'($urandom);
    conv_d = 16'($urandom); ext_d = 16'($urandom); conv_we = 1; ext_we = 1;
    #1;
    case (who)
      0: check(ram_e_addr == conv_a && ram_e_we && ram_e_wdata == conv_d, "convolution owns port");
      1: check(ram_e_addr == find_a && !ram_e_we, "search owns port (read only)");
      default: check(ram_e_addr == ext_a && ram_e_we && ram_e_wdata == ext_d, "follower owns port");
    endcase
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    reset = 0;
    pulse(start_conv);
    check(n_go == 1, "convolution started");
    port_is(0);
    pulse(conv_done);
    check(n_cd == 1, "convolution done forwarded");
    port_is(1);
    // line detection, ended by an exhausted search after two curves
    pulse(start_curves);
    check(n_go == 2, "search started");
    for (int k = 0; k < 2; k++) begin
      port_is(1);
      pulse(find_found);
      check(n_ext == k + 1, "follower started");
      port_is(2);
      ext_curve = curve_t'({$urandom, $urandom, 4'($urandom)});
      pulse(ext_done);
      check(objs.exists(k) && objs[k] == ext_curve, $sformatf("object %0d stored", k));
      check(n_res == k + 1, "search resumed");
    end
    pulse(find_exhausted);
    check(n_ld == 1 && num_objects == 2, "line detection done on exhausted search");
    // second run: object RAM fills up
    objs.delete();
    pulse(start_curves);
    for (int k = 0; k < 3; k++) begin
      pulse(find_found);
      ext_curve = curve_t'({$urandom, $urandom, 4'($urandom)});
      pulse(ext_done);
      check(objs.exists(k) && objs[k] == ext_curve, "object stored in second run");
    end
    check(n_ld == 2 && num_objects == 3, "line detection done on full object RAM");
    check(n_res == 4, "no resume after the last object");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
