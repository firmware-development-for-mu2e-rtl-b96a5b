// drac_link_top: four-lane serial link from a digitizer FPGA of the DRAC
// board (HV or CAL) to its readout controller (ROC), with the ROC-side
// capture memories readable by the ROC's processor over APB.
//
// Per lane, transmit side: a word source, the 8b/10b encoder (pcs_tx) and
// the serializer. The source is either the test-pattern generator
// (generator_seq: comma bursts and counting bytes) or, with src_adc high,
// the digitizer path: 12-bit samples written on adc_clk into a dual-clock
// FIFO (adc_fifo) and turned into 16-bit words by adc_packer, idle commas
// filling the gaps. Receive side: the deserializer, the comma word aligner
// and decoder (pcs_rx), and an SRAM capture (apb_ram) that stores every
// received data word (not control words) while aligned, two per 32-bit
// SRAM word, until the SRAM is full. An APB decoder gives each lane's
// capture a 1 KiB window: lane n at 0x400*n; in it, 0x000-0x0FC are the
// SRAM words and 0x100 the clear/status register (write: clear;
// read: {clearing, memory_full}).
//
// With loopback high each lane receives its own serial output, the test
// set-up; with it low the lane receives ser_rx[n], the link between two
// FPGAs, whose bit clock is assumed to be ser_clk. Clocks: ser_clk is the
// bit clock (2.5 GHz for 125 MHz words); each lane divides it by 20 into
// its word clock (tx_clk/rx_clk outputs); PCLK is the processor bus clock;
// adc_clk the digitizer clock. ser_rst_n resets the serializers, whose
// word clocks must run before the logic they clock can be reset; rst_n
// (released after ser_rst_n, with the word clocks running) resets the
// rest of the link side and the FIFOs, PRESETn the bus side, and
// wa_rst_n restarts word alignment. tx_invalid_k[n] flags a byte the
// lane's word source marked as a control symbol that is not one (never the
// case for the two sources here); the encoders' forced-disparity inputs
// are not used and are tied off.
// The processor, the clock generation and the SerDes analog front end are
// outside this module; their signals are its ports.
module drac_link_top
  import drac_pkg::*;
#(
  parameter int unsigned N_LANES      = 4,
  parameter int unsigned MEM_WORDS    = 64,
  parameter int unsigned N_COMMA      = 16,
  parameter int unsigned N_DATA       = 256,
  parameter int unsigned ALIGN_COMMAS = 4,
  parameter int unsigned FIFO_DEPTH   = 16,
  parameter int unsigned PACK_MODE    = 0,
  parameter int unsigned CLR_CYCLES   = 8
) (
  input  logic                     ser_clk,
  input  logic                     ser_rst_n,
  input  logic                     rst_n,
  input  logic                     wa_rst_n,
  input  logic                     loopback,
  input  logic [N_LANES-1:0]       src_adc,
  output logic [N_LANES-1:0]       ser_tx,
  input  logic [N_LANES-1:0]       ser_rx,
  output logic [N_LANES-1:0]       tx_clk,
  output logic [N_LANES-1:0]       rx_clk,
  // digitizer samples
  input  logic                     adc_clk,
  input  logic [N_LANES-1:0]       adc_valid,
  input  logic [N_LANES-1:0][11:0] adc_data,
  output logic [N_LANES-1:0]       fifo_overflow,
  // lane status
  output logic [N_LANES-1:0]       aligned,
  output logic [N_LANES-1:0][1:0]  code_err,
  output logic [N_LANES-1:0][1:0]  disp_err,
  output logic [N_LANES-1:0][1:0]  tx_invalid_k,
  output logic [N_LANES-1:0]       memory_full,
  // processor bus
  input  logic                     PCLK,
  input  logic                     PRESETn,
  input  apb_req_t                 apb_req,
  output apb_rsp_t                 apb_rsp
);

  apb_req_t s_req [N_LANES];
  apb_rsp_t s_rsp [N_LANES];

  apb_decoder #(.N_SLAVES(N_LANES), .SLOT_LSB(10)) u_apb_dec (
    .PCLK(PCLK), .PRESETn(PRESETn),
    .m_req(apb_req), .m_rsp(apb_rsp), .s_req(s_req), .s_rsp(s_rsp)
  );

  for (genvar n = 0; n < N_LANES; n++) begin : g_lane
    logic [15:0] gen_data, pk_data, tx_data, rx_data;
    logic [1:0]  gen_k, pk_k, tx_k, rx_k;
    logic [19:0] tx_code, rx_raw;
    logic        fifo_full, fifo_empty, fifo_rd, rx_valid;
    logic [11:0] fifo_data;

    generator_seq #(.N_COMMA(N_COMMA), .N_DATA(N_DATA)) u_gen (
      .clk(tx_clk[n]), .reset_n(rst_n), .k_out(gen_k), .data_out(gen_data)
    );

    adc_fifo #(.WIDTH(12), .DEPTH(FIFO_DEPTH)) u_fifo (
      .wr_clk(adc_clk), .wr_rst_n(rst_n), .wr_en(adc_valid[n]),
      .wr_data(adc_data[n]), .full(fifo_full), .overflow(fifo_overflow[n]),
      .rd_clk(tx_clk[n]), .rd_rst_n(rst_n), .rd_en(fifo_rd),
      .rd_data(fifo_data), .empty(fifo_empty)
    );

    adc_packer #(.PACK_MODE(PACK_MODE)) u_pack (
      .clk(tx_clk[n]), .rst_n(rst_n), .fifo_empty(fifo_empty || !src_adc[n]),
      .fifo_data(fifo_data), .fifo_rd(fifo_rd), .data_out(pk_data), .k_out(pk_k)
    );

    assign tx_data = src_adc[n] ? pk_data : gen_data;
    assign tx_k    = src_adc[n] ? pk_k    : gen_k;

    pcs_tx u_enc (
      .clk(tx_clk[n]), .rst_n(rst_n), .tx_data(tx_data), .tx_k(tx_k),
      .force_disp(2'b00), .disp_sel(2'b00),
      .tx_code(tx_code), .invalid_k(tx_invalid_k[n])
    );

    serdes_lane #(.SER_W(20)) u_serdes (
      .ser_clk(ser_clk), .rst_n(ser_rst_n), .loopback(loopback),
      .tx_par(tx_code), .tx_clk(tx_clk[n]), .ser_tx(ser_tx[n]),
      .ser_rx(ser_rx[n]), .rx_par(rx_raw), .rx_clk(rx_clk[n])
    );

    pcs_rx #(.ALIGN_COMMAS(ALIGN_COMMAS)) u_dec (
      .clk(rx_clk[n]), .rst_n(rst_n), .wa_rst_n(wa_rst_n), .rx_raw(rx_raw),
      .aligned(aligned[n]), .rx_valid(rx_valid), .rx_data(rx_data),
      .rx_k(rx_k), .code_err(code_err[n]), .disp_err(disp_err[n])
    );

    apb_ram #(.MEM_WORDS(MEM_WORDS), .CLR_CYCLES(CLR_CYCLES)) u_ram (
      .PCLK(PCLK), .reset_n(PRESETn), .apb_req(s_req[n]), .apb_rsp(s_rsp[n]),
      .WCLK(rx_clk[n]), .WEN(rx_valid && rx_k == 2'b00), .WD(rx_data),
      .memory_full(memory_full[n])
    );
  end

endmodule
