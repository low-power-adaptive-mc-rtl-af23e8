40000000
3ffbfe6e
3fecfcdc
3fd4fb4b
3fb1f9ba
3f85f82a
3f4ff69c
3f0ff50f
3ec5f384
3e72f1fa
3e15f073
3dafeeee
3d3fed6c
3cc5ebed
3c42ea70
3bb6e8f7
3b21e782
3a82e611
39dbe4a3
392be33a
3871e1d5
37b0e074
36e5df19
3612ddc3
3537dc72
3453db26
3368d9e0
3274d8a0
3179d766
3076d632
2f6cd505
2e5ad3df
2d41d2bf
2c21d1a6
2afbd094
29cecf8a
289ace87
2760cd8c
2620cc98
24dacbad
238ecac9
223dc9ee
20e7c91b
1f8cc850
1e2bc78f
1cc6c6d5
1b5dc625
19efc57e
187ec4df
1709c44a
1590c3be
1413c33b
1294c2c1
1112c251
0f8dc1eb
0e06c18e
0c7cc13b
0af1c0f1
0964c0b1
07d6c07b
0646c04f
04b5c02c
0324c014
0192c005
0000c000
fe6ec005
fcdcc014
fb4bc02c
f9bac04f
f82ac07b
f69cc0b1
f50fc0f1
f384c13b
f1fac18e
f073c1eb
eeeec251
ed6cc2c1
ebedc33b
ea70c3be
e8f7c44a
e782c4df
e611c57e
e4a3c625
e33ac6d5
e1d5c78f
e074c850
df19c91b
ddc3c9ee
dc72cac9
db26cbad
d9e0cc98
d8a0cd8c
d766ce87
d632cf8a
d505d094
d3dfd1a6
d2bfd2bf
d1a6d3df
d094d505
cf8ad632
ce87d766
cd8cd8a0
cc98d9e0
cbaddb26
cac9dc72
c9eeddc3
c91bdf19
c850e074
c78fe1d5
c6d5e33a
c625e4a3
c57ee611
c4dfe782
c44ae8f7
c3beea70
c33bebed
c2c1ed6c
c251eeee
c1ebf073
c18ef1fa
c13bf384
c0f1f50f
c0b1f69c
c07bf82a
c04ff9ba
c02cfb4b
c014fcdc
c005fe6e
c0000000
c0050192
c0140324
c02c04b5
c04f0646
c07b07d6
c0b10964
c0f10af1
c13b0c7c
c18e0e06
c1eb0f8d
c2511112
c2c11294
c33b1413
c3be1590
c44a1709
c4df187e
c57e19ef
c6251b5d
c6d51cc6
c78f1e2b
c8501f8c
c91b20e7
c9ee223d
cac9238e
cbad24da
cc982620
cd8c2760
ce87289a
cf8a29ce
d0942afb
d1a62c21
d2bf2d41
d3df2e5a
d5052f6c
d6323076
d7663179
d8a03274
d9e03368
db263453
dc723537
ddc33612
df1936e5
e07437b0
e1d53871
e33a392b
e4a339db
e6113a82
e7823b21
e8f73bb6
ea703c42
ebed3cc5
ed6c3d3f
eeee3daf
f0733e15
f1fa3e72
f3843ec5
f50f3f0f
f69c3f4f
f82a3f85
f9ba3fb1
fb4b3fd4
fcdc3fec
fe6e3ffb
00004000
01923ffb
03243fec
04b53fd4
06463fb1
07d63f85
09643f4f
0af13f0f
0c7c3ec5
0e063e72
0f8d3e15
11123daf
12943d3f
14133cc5
15903c42
17093bb6
187e3b21
19ef3a82
1b5d39db
1cc6392b
1e2b3871
1f8c37b0
20e736e5
223d3612
238e3537
24da3453
26203368
27603274
289a3179
29ce3076
2afb2f6c
2c212e5a
2d412d41
2e5a2c21
2f6c2afb
307629ce
3179289a
32742760
33682620
345324da
3537238e
3612223d
36e520e7
37b01f8c
38711e2b
392b1cc6
39db1b5d
3a8219ef
3b21187e
3bb61709
3c421590
3cc51413
3d3f1294
3daf1112
3e150f8d
3e720e06
3ec50c7c
3f0f0af1
3f4f0964
3f8507d6
3fb10646
3fd404b5
3fec0324
3ffb0192
