// Controller and bus arbiter of the processing unit. It follows the start
// and completion signals of the processing modules and gives the edge-RAM
// port to whichever of them is working:
//   P_CONV    convolve_fsm writes filter results      (start_conv .. conv_done)
//   P_FIND    find_pix_fsm reads                      (until found/exhausted)
//   P_EXTRACT extract_curve_fsm reads and clears      (until its done)
// After each extracted curve it writes the 68-bit object to the next object
// RAM word (one cycle, obj_we) and resumes the search. Line detection ends
// when the search is exhausted or MAX_OBJECTS objects have been written.
// conv_done_out / curves_done are one-cycle pulses; num_objects holds the
// count of objects written by the last line detection. The start pixel is
// handed to the curve follower in the same cycle as its start pulse.
module major_filtering_fsm
  import caricatron_pkg::*;
#(
  parameter int unsigned MAX_OBJECTS = 2048
) (
  input  logic        clk,
  input  logic        reset,
  input  logic        start_conv,
  input  logic        start_curves,
  output logic        conv_done_out,
  output logic        curves_done,
  // convolution
  output logic        conv_go,
  input  logic        conv_done,
  input  logic [16:0] conv_e_addr,
  input  logic        conv_e_we,
  input  logic [15:0] conv_e_wdata,
  // start-pixel search
  output logic        find_go,
  output logic        find_resume,
  input  logic        find_found,
  input  logic        find_exhausted,
  input  logic [16:0] find_e_addr,
  // curve follower
  output logic        ext_go,
  input  logic        ext_done,
  input  curve_t      ext_curve,
  input  logic [16:0] ext_e_addr,
  input  logic        ext_e_we,
  input  logic [15:0] ext_e_wdata,
  // edge RAM port
  output logic [16:0] ram_e_addr,
  output logic        ram_e_we,
  output logic [15:0] ram_e_wdata,
  // object RAM port
  output logic [10:0] ram_o_addr,
  output logic        ram_o_we,
  output curve_t      ram_o_data,
  output logic [11:0] num_objects
);
  typedef enum logic [1:0] {P_IDLE, P_CONV, P_FIND, P_EXTRACT} pstate_t;
  pstate_t st;

  always_comb begin
    unique case (st)
      P_CONV: begin
        ram_e_addr = conv_e_addr;  ram_e_we = conv_e_we;  ram_e_wdata = conv_e_wdata;
      end
      P_EXTRACT: begin
        ram_e_addr = ext_e_addr;   ram_e_we = ext_e_we;   ram_e_wdata = ext_e_wdata;
      end
      default: begin
        ram_e_addr = find_e_addr;  ram_e_we = 1'b0;       ram_e_wdata = '0;
      end
    endcase
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      st <= P_IDLE;
      {conv_go, find_go, find_resume, ext_go, conv_done_out, curves_done, ram_o_we} <= '0;
      num_objects <= '0;
      ram_o_addr  <= '0;
      ram_o_data  <= '0;
    end else begin
      {conv_go, find_go, find_resume, ext_go, conv_done_out, curves_done, ram_o_we} <= '0;
      unique case (st)
        P_IDLE: begin
          if (start_conv) begin
            conv_go <= 1'b1;
            st      <= P_CONV;
          end else if (start_curves) begin
            find_go     <= 1'b1;
            num_objects <= '0;
            st          <= P_FIND;
          end
        end
        P_CONV: if (conv_done) begin
          conv_done_out <= 1'b1;
          st            <= P_IDLE;
        end
        P_FIND: begin
          if (find_found) begin
            ext_go <= 1'b1;
            st     <= P_EXTRACT;
          end else if (find_exhausted) begin
            curves_done <= 1'b1;
            st          <= P_IDLE;
          end
        end
        P_EXTRACT: if (ext_done) begin
          ram_o_we    <= 1'b1;
          ram_o_addr  <= num_objects[10:0];
          ram_o_data  <= ext_curve;
          num_objects <= num_objects + 1'b1;
          if (32'(num_objects) == MAX_OBJECTS - 1) begin
            curves_done <= 1'b1;
            st          <= P_IDLE;
          end else begin
            find_resume <= 1'b1;
            st          <= P_FIND;
          end
        end
        default: st <= P_IDLE;
      endcase
    end
  end
endmodule
