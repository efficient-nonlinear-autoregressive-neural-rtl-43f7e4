f73ab
06b9e
02b8f
0bc45
043a1
ee000
17000
e9800
f5400
fdc00
07c00
04000
e9800
18800
11800
ea000
fac00
f1000
ec800
16c00
01c00
18800
09400
fbc00
fec00
f9000
e8c00
fc400
0d400
08800
e9400
12400
f6800
ee400
e9800
00800
f5400
04800
ff800
0a400
e8400
edc00
fd800
e8800
07800
fc800
ec800
f5c00
08800
19400
ea000
f6400
0f000
0d800
10800
eb000
10400
0a400
03c00
f5000
fc400
efc00
f3000
13400
fa400
10c00
04400
03c00
f6800
08c00
ecc00
07000
01400
0a000
e7800
f1c00
f9800
13400
04c00
fe000
dfc08
f2000
2f800
ca400
f9800
