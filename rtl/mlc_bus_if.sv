// mlc_bus_if: memory-mapped registers through which the microcontroller of the
// MLC control unit hands the modulator its inputs.
//
// The source design says the FPGA peripherals sit in the microcontroller's address
// space and that U_x, U_y, a logic flag for the dc-link capacitor condition and
// the load current directions are sent over a parallel bus. The register map,
// the strobe protocol and the read-back are this design's own choice:
//   addr 0 : U_x (signed, see svm_pkg)     addr 1 : U_y
//   addr 2 : bit 0 udc_c1_high (1 = U_C1 above U_d/2), bit 1 i_u, bit 2 i_v,
//            bit 3 i_w (1 = current flows from the leg into the load)
//   addr 3 : reads the fault flag in bit 0, writes ignored
// A write happens on the clock edge where cs and we are both high. Read data
// is combinational from addr. All registers reset to zero.
module mlc_bus_if
  import svm_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  cs,
  input  logic                  we,
  input  logic [1:0]            addr,
  input  logic [U_W-1:0]        wdata,
  output logic [U_W-1:0]        rdata,
  input  logic                  fault_flag,
  output logic signed [U_W-1:0] data_Ux,
  output logic signed [U_W-1:0] data_Uy,
  output logic                  udc_c1_high,
  output logic [2:0]            i_dir        // {i_w, i_v, i_u}
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      data_Ux     <= '0;
      data_Uy     <= '0;
      udc_c1_high <= 1'b0;
      i_dir       <= '0;
    end else if (cs && we) begin
      unique case (addr)
        2'd0: data_Ux <= wdata;
        2'd1: data_Uy <= wdata;
        2'd2: {i_dir, udc_c1_high} <= wdata[3:0];
        default: ;
      endcase
    end
  end

  always_comb begin
    unique case (addr)
      2'd0:    rdata = data_Ux;
      2'd1:    rdata = data_Uy;
      2'd2:    rdata = {{(U_W-4){1'b0}}, i_dir, udc_c1_high};
      default: rdata = {{(U_W-1){1'b0}}, fault_flag};
    endcase
  end

endmodule
